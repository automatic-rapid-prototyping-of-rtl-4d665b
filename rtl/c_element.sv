// Muller C-element with reset and both output senses.
//
// The output takes the common value of i1 and i2 when they agree and keeps
// its value while they differ. A high reset forces the output low. Both out
// and its inverse out_n are provided, as in the library cell; an unused out_n
// is removed by the place-and-route optimisation.
//
// STYLE selects how the storage is written:
//   STYLE = 0 : a level-sensitive storage element whose enable is
//               (i1 == i2) - the compact form, used by default.
//   STYLE = 1 : the FPGA mapping of three modules: an ACT-1 module selected
//               by i1 and i2 that passes 0 (both low), 1 (both high) or its
//               own fed-back output (inputs differ); a second ACT-1 module
//               that forces 0 while reset is high; an inverter for out_n.
//               The published mapping uses two ACT-1 modules and an inverter
//               with constant-1 and constant-0 data inputs; its exact pin
//               wiring is this design's reconstruction from that.
// Either way the element holds state: the latch (STYLE 0) and the feedback
// loop through the modules (STYLE 1) are intended.
module c_element #(
  parameter int unsigned STYLE = 0
) (
  input  logic reset,
  input  logic i1,
  input  logic i2,
  output logic out,
  output logic out_n
);
  logic st;

  if (STYLE == 0) begin : g_latch
    always_latch begin
      if (reset)         st = 1'b0;
      else if (i1 == i2) st = i1;
    end
  end else begin : g_act1
    logic keep;
    // agree -> common value, differ -> fed-back output
    act1_module u_c (
      .sel0(i1), .sel1(1'b0),
      .sela(i2), .a0(1'b0), .a1(st),
      .selb(i2), .b0(st),   .b1(1'b1),
      .out (keep)
    );
    // reset gate
    act1_module u_rst (
      .sel0(reset), .sel1(1'b0),
      .sela(1'b0), .a0(keep), .a1(keep),
      .selb(1'b0), .b0(1'b0), .b1(1'b0),
      .out (st)
    );
  end

  assign out   = st;
  assign out_n = ~st;
endmodule
