// Asynchronous micropipelined 4x4 array multiplier (the asynchronous chip).
//
// Same arithmetic as the synchronous version (mult_rows, six latch bars, five
// adder rows), but each bar is a dual-edge-triggered latch controlled by its
// own C-element instead of a clock, in the two-phase (transition) handshake
// style of micropipelines:
//   c[k]  = C( request into bar k , NOT acknowledge from bar k+1 )
// Every transition of c[k] makes bar k capture its input, acknowledges bar
// k-1 (c[k] is the acknowledge seen by stage k-1) and, after a matched delay
// that covers the adder row below, requests bar k+1. Bar 0 is requested by
// req_in and acknowledges with ack_out; bar 5 requests the environment with
// req_out (after a matched delay) and is acknowledged by ack_in.
//
// Protocol at the ports (two-phase): put operands on a/b, then toggle req_in;
// a toggle of ack_out says they were taken. A toggle of req_out says p holds
// a new product; toggle ack_in once it has been read. reset (high) clears all
// C-elements; req_in and ack_in must be low while it is high.
// The use of C-elements and dual-edge latches follows the published chip;
// the exact control wiring and the matched delays are this design's choice,
// following the standard micropipeline control.
//
// Tools that ignore delays see a combinational loop through the C-elements
// (request forward, acknowledge back) and report the C-elements and the
// dual-edge latches as latches. Both are the circuit: a self-timed pipeline
// holds its state in exactly these elements, and the loop is broken in time
// by the matched delays.
module amo_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned FA_STYLE = 1,
  parameter int unsigned DELAY    = 2,
  parameter int unsigned C_STYLE  = 0
) (
  input  logic          reset,
  input  logic          req_in,
  output logic          ack_out,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic          req_out,
  input  logic          ack_in,
  output logic [PW-1:0] p
);
  stage_t bar0_d, row1_d, row2_d, row3_d, row4_d, row5_d;
  stage_t bar0_q, bar1_q, bar2_q, bar3_q, bar4_q, bar5_q;
  // C-element outputs (= latch controls) of bars 0..5
  logic c0, c1, c2, c3, c4, c5;

  always_comb begin
    bar0_d   = '0;
    bar0_d.a = a;
    bar0_d.b = b;
  end

  // bar k: request from bar k-1 (delayed), acknowledge from bar k+1
  amo_stage #(.DELAY(0), .C_STYLE(C_STYLE)) u_st0 (.reset(reset), .req(req_in), .ack(c1),     .c(c0), .d(bar0_d), .q(bar0_q));
  amo_stage #(.DELAY(DELAY), .C_STYLE(C_STYLE)) u_st1 (.reset(reset), .req(c0),     .ack(c2),     .c(c1), .d(row1_d), .q(bar1_q));
  amo_stage #(.DELAY(DELAY), .C_STYLE(C_STYLE)) u_st2 (.reset(reset), .req(c1),     .ack(c3),     .c(c2), .d(row2_d), .q(bar2_q));
  amo_stage #(.DELAY(DELAY), .C_STYLE(C_STYLE)) u_st3 (.reset(reset), .req(c2),     .ack(c4),     .c(c3), .d(row3_d), .q(bar3_q));
  amo_stage #(.DELAY(DELAY), .C_STYLE(C_STYLE)) u_st4 (.reset(reset), .req(c3),     .ack(c5),     .c(c4), .d(row4_d), .q(bar4_q));
  amo_stage #(.DELAY(DELAY), .C_STYLE(C_STYLE)) u_st5 (.reset(reset), .req(c4),     .ack(ack_in), .c(c5), .d(row5_d), .q(bar5_q));

  mult_rows #(.FA_STYLE(FA_STYLE)) u_rows (
    .bar0_q(bar0_q), .bar1_q(bar1_q), .bar2_q(bar2_q), .bar3_q(bar3_q), .bar4_q(bar4_q),
    .row1_d(row1_d), .row2_d(row2_d), .row3_d(row3_d), .row4_d(row4_d), .row5_d(row5_d)
  );

  assign ack_out = c0;
  matched_delay #(.DELAY(DELAY)) u_out_dly (.in(c5), .out(req_out));
  assign p = bar5_q.p;
endmodule
