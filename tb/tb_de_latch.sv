// Self-checking testbench for de_latch, the dual-edge-triggered latch. The
// input changes at random times and the control en toggles at other random
// times. After each toggle (rising or falling) the output must equal the
// input present at that toggle, and it must not move while en is steady.
module tb_de_latch;
  logic       en;
  logic [7:0] d, q, captured;
  int checks = 0, failures = 0;
  int rises = 0, falls = 0;

  de_latch #(.W(8)) dut (.en(en), .d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; d = 8'h5a; #1;
    en = 1'b1; #1;               // first capture
    captured = 8'h5a;
    rises++;
    for (int i = 0; i < 400; i++) begin
      d = 8'($urandom);
      #1;
      if ($urandom % 3 == 0) begin
        captured = d;
        en = ~en;
        if (en) rises++; else falls++;
      end
      #1;
      checks++;
      if (q !== captured) begin
        failures++;
        $display("FAIL en=%b q=%h exp=%h", en, q, captured);
      end
    end
    checks++;
    if (rises < 10 || falls < 10) begin
      failures++;
      $display("FAIL too few edges rises=%0d falls=%0d", rises, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
