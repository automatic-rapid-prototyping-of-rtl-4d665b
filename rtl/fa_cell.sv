// Full-adder cell as translated from the PPL cell library to Actel modules.
//
// The PPL full adder takes the carry in inverted and returns the carry out and
// the sum inverted:  ci_n = ~Ci,  co_n = ~Co,  sum_n = ~S  with
// {Co,S} = A + B + Ci. Two translations are offered, selected by STYLE:
//   STYLE = 0 : the vendor FA1B macro (inverted carry in, inverted carry out)
//               followed by an extra inverter on the sum: three module delays
//               to the sum.
//   STYLE = 1 : two ACT-1 modules (configured as MXT multiplexers) and one
//               inverter: two module delays to the sum.
// The FA1B macro is a vendor cell; it is written here from its logic
// function. For STYLE 1 the pin-level wiring of the two modules is not fully
// legible in the published drawing, so this design uses the simplest wiring
// that matches its labels (A, B and ~Ci in, constant 1 and 0 as data inputs,
// one inverter on the carry in): carry module selects on A and B and passes
// 1, 0 or ~Ci; sum module selects on A and B and passes ~Ci or Ci.
// Combinational; no clock.
module fa_cell #(
  parameter int unsigned STYLE = 1
) (
  input  logic a,
  input  logic b,
  input  logic ci_n,
  output logic co_n,
  output logic sum_n
);
  if (STYLE == 0) begin : g_fa1b
    // FA1B: full adder with inverted carry input and inverted carry output.
    logic ci, co, s;
    always_comb begin
      ci    = ~ci_n;
      {co, s} = {1'b0, a} + {1'b0, b} + {1'b0, ci};
      co_n  = ~co;
      sum_n = ~s;     // the extra inverter after the FA1B sum output
    end
  end else begin : g_mxt
    logic ci;          // the single inverter of this translation
    assign ci = ~ci_n;

    // Carry module: A == B -> ~Co = ~A ; A != B -> ~Co = ~Ci.
    act1_module u_carry (
      .sel0(b), .sel1(1'b0),
      .sela(a), .a0(1'b1), .a1(ci_n),
      .selb(a), .b0(ci_n), .b1(1'b0),
      .out (co_n)
    );
    // Sum module: ~S = A ^ B ^ ~Ci.
    act1_module u_sum (
      .sel0(b), .sel1(1'b0),
      .sela(a), .a0(ci_n), .a1(ci),
      .selb(a), .b0(ci), .b1(ci_n),
      .out (sum_n)
    );
  end
endmodule
