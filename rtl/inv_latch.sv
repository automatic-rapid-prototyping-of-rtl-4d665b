// Static inverting transparent latch (the latch cell of the synchronous chip).
//
// While the gate g is high the output follows the inverse of the input; when
// g falls the inverse of the last input is held. The cell maps directly onto
// an Actel latch with the same behaviour. W latches share one gate.
// Level-sensitive storage is the purpose of this module, so the inferred
// latch is intended.
module inv_latch #(
  parameter int unsigned W = 1
) (
  input  logic         g,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_n
);
  always_latch begin
    if (g) q_n = ~d;
  end
endmodule
