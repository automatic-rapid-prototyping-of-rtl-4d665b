// Self-checking testbench for inv_latch. Random 8-bit data and random gate
// levels: while the gate is high the output must be the inverse of the
// input; while it is low it must keep the inverse of the value present when
// the gate fell, however the input moves.
module tb_inv_latch;
  logic       g;
  logic [7:0] d, q_n, held;
  int checks = 0, failures = 0;

  inv_latch #(.W(8)) dut (.g(g), .d(d), .q_n(q_n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g = 1'b1; d = 8'h00; #1;
    held = ~d;
    for (int i = 0; i < 500; i++) begin
      if ($urandom % 4 == 0) g = ~g;
      d = 8'($urandom);
      #1;
      if (g) held = ~d;
      checks++;
      if (q_n !== held) begin
        failures++;
        $display("FAIL g=%b d=%h q_n=%h exp=%h", g, d, q_n, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
