// Self-checking testbench for act1_module, the ACT-1 basic logic module.
// Applies all 256 input combinations and compares the output with the
// expected multiplexer function: when SEL0 or SEL1 is high the module passes
// the B side (B1 if SELB else B0), otherwise the A side (A1 if SELA else A0).
module tb_act1_module;
  logic sel0, sel1, sela, a0, a1, selb, b0, b1, out;
  int checks = 0, failures = 0;

  act1_module dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    logic exp;
    for (int i = 0; i < 256; i++) begin
      v = 8'(i);
      {sel0, sel1, sela, a0, a1, selb, b0, b1} = v;
      #1;
      // reference from a truth-table view: pick index of the data pin
      if (v[7] || v[6]) exp = v[0 + (v[2] ? 0 : 1)];       // b1 is v[0], b0 is v[1]
      else              exp = v[3 + (v[5] ? 0 : 1)];       // a1 is v[3], a0 is v[4]
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL inputs=%b out=%b exp=%b", v, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
