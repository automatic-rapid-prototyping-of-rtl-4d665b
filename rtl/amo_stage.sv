// One stage of the micropipelined multiplier: control and latch bar.
//
// The stage's C-element combines the incoming request (passed through a
// matched delay of DELAY time units, none for the first stage whose request
// comes straight from the environment) with the inverse of the acknowledge
// from the next stage: c = C(req delayed, NOT ack). Each transition of c
// makes the dual-edge-triggered latch capture d, and c itself is both the
// acknowledge to the previous stage and the request to the next one. A high
// reset clears the C-element. C_STYLE chooses the C-element form (see
// c_element). This is the standard two-phase micropipeline
// control; its use here is this design's choice. The C-element and the two
// latches of the bar are intended storage elements.
module amo_stage
  import mult_pkg::*;
#(
  parameter int unsigned DELAY   = 2,
  parameter int unsigned C_STYLE = 0
) (
  input  logic   reset,
  input  logic   req,
  input  logic   ack,
  output logic   c,
  input  stage_t d,
  output stage_t q
);
  logic req_dly, c_n_unused;

  if (DELAY == 0) begin : g_nodly
    assign req_dly = req;
  end else begin : g_dly
    matched_delay #(.DELAY(DELAY)) u_dly (.in(req), .out(req_dly));
  end

  c_element #(.STYLE(C_STYLE)) u_c (.reset(reset), .i1(req_dly), .i2(~ack), .out(c), .out_n(c_n_unused));

  logic [STAGE_W-1:0] q_bits;
  de_latch #(.W(STAGE_W)) u_lat (.en(c), .d(d), .q(q_bits));
  assign q = stage_t'(q_bits);
endmodule
