// Dual-edge-triggered latch of the asynchronous (micropipelined) chip.
//
// Captures its input on every transition of en, rising or falling, and holds
// it until the next transition. It is built as in the published Actel
// translation from three modules: a latch DL1 transparent while en is high,
// a latch DL1B transparent while en is low, both fed by the same input, and a
// 2:1 multiplexer MX2 selected by en. The multiplexer always passes the latch
// that is holding: after a rising edge of en the DL1B output (which closed on
// that edge), after a falling edge the DL1 output. Which multiplexer input
// goes to which latch is not printed; it follows from the cell's function.
// The input must be stable around each transition of en. W bits share en.
// The two latches are intended.
module de_latch #(
  parameter int unsigned W = 1
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] q_dl1, q_dl1b;

  always_latch begin
    if (en) q_dl1 = d;        // DL1: transparent while en is high
  end

  always_latch begin
    if (!en) q_dl1b = d;      // DL1B: transparent while en is low
  end

  assign q = en ? q_dl1b : q_dl1;   // MX2
endmodule
