// Actel ACT-1 basic logic module.
//
// The programmable cell every Actel ACT-1 macro is built from: two 2:1
// multiplexers (A0/A1 chosen by SELA, B0/B1 chosen by SELB) feed a third 2:1
// multiplexer whose select is the OR of SEL0 and SEL1. The structure and pin
// names are the published ones. Which data input a select value of 1 picks is
// not printed; this model follows the vendor convention: a select of 1 picks
// input 1 (A1, B1) and an OR output of 1 picks the B multiplexer.
// Purely combinational; output settles one module delay after the inputs.
module act1_module (
  input  logic sel0,
  input  logic sel1,
  input  logic sela,
  input  logic a0,
  input  logic a1,
  input  logic selb,
  input  logic b0,
  input  logic b1,
  output logic out
);
  logic mux_a, mux_b, sel_or;

  always_comb begin
    mux_a  = sela ? a1 : a0;
    mux_b  = selb ? b1 : b0;
    sel_or = sel0 | sel1;
    out    = sel_or ? mux_b : mux_a;
  end
endmodule
