// Two-phase non-overlapping clock driver, translated from the PPL clock cell.
//
// From one input clock it makes two phases, phi0 (high while clk is high) and
// phi1 (high while clk is low), each with its complement. The phases are
// gated against each other through a cross-coupled pair: phi0 can rise only
// after phi1 has fallen and phi1 only after phi0 has fallen, so whatever the
// gate delays, the two phases are never high together. The published cell is
// built from two GAND2 gates, an AND2 and inverters; here the same
// cross-coupled AND structure is written at gate level.
//
// HIGH_LEVEL = 1 selects the hand translation instead: when the phases drive
// only latch clocks, the Actel dedicated clock line is used directly and the
// second phase is just its inverse (one inverter, no cross-coupling).
//
// The cross-coupled pair is a combinational loop on purpose: it is the
// mechanism that enforces non-overlap and is kept as such.
module ppl_clock_driver #(
  parameter bit HIGH_LEVEL = 1'b0
) (
  input  logic clk,
  output logic phi0,
  output logic phi0_n,
  output logic phi1,
  output logic phi1_n
);
  if (HIGH_LEVEL) begin : g_dedicated
    assign phi0 = clk;
    assign phi1 = ~clk;
  end else begin : g_cross
    // each phase is enabled only while the other one is low
    assign phi0 = clk  & ~phi1;
    assign phi1 = ~clk & ~phi0;
  end

  assign phi0_n = ~phi0;
  assign phi1_n = ~phi1;
endmodule
