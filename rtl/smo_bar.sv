// One latch bar of the synchronous multiplier.
//
// A pair of static inverting transparent latches on every bit of the stage
// bundle: the first is open while phi1 is high, the second while phi0 is
// high. The two inversions cancel, so q is d as it was when phi1 last fell,
// updated when phi0 rises; with non-overlapping phases this behaves as a
// register clocked at the rise of phi0. Pairing the latches in one bar is
// this design's choice (see smo_multiplier).
module smo_bar
  import mult_pkg::*;
(
  input  logic   phi0,
  input  logic   phi1,
  input  stage_t d,
  output stage_t q
);
  logic [STAGE_W-1:0] mid_n, out_n;

  inv_latch #(.W(STAGE_W)) u_master (.g(phi1), .d(d),     .q_n(mid_n));
  inv_latch #(.W(STAGE_W)) u_slave  (.g(phi0), .d(mid_n), .q_n(out_n));

  assign q = stage_t'(out_n);
endmodule
