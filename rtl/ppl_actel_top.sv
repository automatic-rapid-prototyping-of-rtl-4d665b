// Top level: the synchronous and the asynchronous 4x4 pipelined array
// multipliers side by side, as the two test designs of this prototyping flow.
//
// Synchronous side: the two-phase clock driver turns clk into non-overlapping
// phases phi0/phi1, which clock the latch bars of smo_multiplier. Operands
// smo_a/smo_b are captured at each rising edge of clk; the product appears on
// smo_p five clock periods later, one product per period.
// Asynchronous side: amo_multiplier with its two-phase request/acknowledge
// ports brought out unchanged (see amo_multiplier for the protocol).
// The two sides share nothing but the module boundary.
// The latches, the cross-coupled clock-phase gates and the request/acknowledge
// loop of the asynchronous side are intended; see the sub-modules.
module ppl_actel_top
  import mult_pkg::*;
#(
  parameter int unsigned FA_STYLE   = 1,
  parameter bit          HIGH_LEVEL = 1'b0,
  parameter int unsigned DELAY   = 2,
  parameter int unsigned C_STYLE = 0
) (
  // synchronous multiplier
  input  logic          clk,
  input  logic [N-1:0]  smo_a,
  input  logic [N-1:0]  smo_b,
  output logic [PW-1:0] smo_p,
  output logic          phi0,
  output logic          phi1,
  // asynchronous multiplier
  input  logic          amo_reset,
  input  logic          amo_req_in,
  output logic          amo_ack_out,
  input  logic [N-1:0]  amo_a,
  input  logic [N-1:0]  amo_b,
  output logic          amo_req_out,
  input  logic          amo_ack_in,
  output logic [PW-1:0] amo_p
);
  logic phi0_n_unused, phi1_n_unused;

  ppl_clock_driver #(.HIGH_LEVEL(HIGH_LEVEL)) u_clk (
    .clk(clk), .phi0(phi0), .phi0_n(phi0_n_unused), .phi1(phi1), .phi1_n(phi1_n_unused)
  );

  smo_multiplier #(.FA_STYLE(FA_STYLE)) u_smo (
    .phi0(phi0), .phi1(phi1), .a(smo_a), .b(smo_b), .p(smo_p)
  );

  amo_multiplier #(.FA_STYLE(FA_STYLE), .DELAY(DELAY), .C_STYLE(C_STYLE)) u_amo (
    .reset(amo_reset), .req_in(amo_req_in), .ack_out(amo_ack_out),
    .a(amo_a), .b(amo_b),
    .req_out(amo_req_out), .ack_in(amo_ack_in), .p(amo_p)
  );
endmodule
