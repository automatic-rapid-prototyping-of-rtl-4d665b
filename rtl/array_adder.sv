// One bit adder of the multiplier array (a dark square of the array floorplan).
//
// Wraps the translated full-adder cell, whose carry in, carry out and sum are
// active low, with the inverters that give true-polarity signals to the array:
// {cout, sum} = x + y + z. Which adder translation is used is passed through
// as STYLE (see fa_cell). Combinational.
module array_adder #(
  parameter int unsigned STYLE = 1
) (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic cout
);
  logic co_n, sum_n;

  fa_cell #(.STYLE(STYLE)) u_fa (
    .a(x), .b(y), .ci_n(~z), .co_n(co_n), .sum_n(sum_n)
  );

  assign sum  = ~sum_n;
  assign cout = ~co_n;
endmodule
