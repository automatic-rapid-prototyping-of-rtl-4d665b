// Synchronous pipelined 4x4 array multiplier (the synchronous chip).
//
// Computes p = a * b for unsigned 4-bit operands through the five adder rows
// of mult_rows, with a latch bar in front of row 1 and after every row: six
// bars, five pipeline stages. Each bar is a pair of static inverting latches,
// the first transparent on phi1 and the second on phi0, so a bar passes its
// data through uninverted and acts as an edge-triggered register at the rise
// of phi0. The two phases come from the two-phase clock driver and must not
// overlap.
//
// Timing: operands present at the rise of phi0 number n are captured by bar
// 0; their product is at p after the rise of phi0 number n+5, that is a
// latency of five clock periods, and one new product leaves every period.
// The row structure follows the published floorplan; using two latches per
// bar (rather than alternating phases from bar to bar) is this design's
// reading of the published latency of five clock periods.
module smo_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned FA_STYLE = 1
) (
  input  logic          phi0,
  input  logic          phi1,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [PW-1:0] p
);
  // one bundle per latch bar; kept as separate signals so that each bar
  // is its own node in the netlist
  stage_t bar0_d, row1_d, row2_d, row3_d, row4_d, row5_d;
  stage_t bar0_q, bar1_q, bar2_q, bar3_q, bar4_q, bar5_q;

  always_comb begin
    bar0_d   = '0;
    bar0_d.a = a;
    bar0_d.b = b;
  end

  smo_bar u_bar0 (.phi0(phi0), .phi1(phi1), .d(bar0_d), .q(bar0_q));
  smo_bar u_bar1 (.phi0(phi0), .phi1(phi1), .d(row1_d), .q(bar1_q));
  smo_bar u_bar2 (.phi0(phi0), .phi1(phi1), .d(row2_d), .q(bar2_q));
  smo_bar u_bar3 (.phi0(phi0), .phi1(phi1), .d(row3_d), .q(bar3_q));
  smo_bar u_bar4 (.phi0(phi0), .phi1(phi1), .d(row4_d), .q(bar4_q));
  smo_bar u_bar5 (.phi0(phi0), .phi1(phi1), .d(row5_d), .q(bar5_q));

  mult_rows #(.FA_STYLE(FA_STYLE)) u_rows (
    .bar0_q(bar0_q), .bar1_q(bar1_q), .bar2_q(bar2_q), .bar3_q(bar3_q), .bar4_q(bar4_q),
    .row1_d(row1_d), .row2_d(row2_d), .row3_d(row3_d), .row4_d(row4_d), .row5_d(row5_d)
  );

  assign p = bar5_q.p;
endmodule
