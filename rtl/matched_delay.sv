// Matched delay element of the micropipeline request path.
//
// Behavioural model: out follows in after DELAY time units. In silicon
// this is a chain of gates whose delay is made at least as long as the
// worst-case delay of the logic of the stage it accompanies, so a request
// never arrives before its data. The delay statement is ignored by synthesis;
// a real implementation replaces this module with a buffer chain.
module matched_delay #(
  parameter int unsigned DELAY = 2
) (
  input  logic in,
  output logic out
);
  assign #(DELAY) out = in;
endmodule
