// Self-checking testbench for ppl_clock_driver. Both the gate-level
// cross-coupled generator and the dedicated-clock version are driven with an
// irregular clock. At every change of any phase the testbench checks that
// phi0 and phi1 are never high together and that each complement output is
// the inverse of its phase; after every clock change it checks that phi0
// follows clk and phi1 its inverse.
module tb_ppl_clock_driver;
  logic clk;
  logic p0, p0n, p1, p1n;     // cross-coupled version
  logic h0, h0n, h1, h1n;     // dedicated clock line version
  int checks = 0, failures = 0;
  int overlaps = 0;

  ppl_clock_driver #(.HIGH_LEVEL(1'b0)) dut (.clk(clk), .phi0(p0), .phi0_n(p0n), .phi1(p1), .phi1_n(p1n));
  ppl_clock_driver #(.HIGH_LEVEL(1'b1)) dut_hl (.clk(clk), .phi0(h0), .phi0_n(h0n), .phi1(h1), .phi1_n(h1n));

  always @(p0 or p1 or h0 or h1) begin
    #0;
    checks++;
    if ((p0 && p1) || (h0 && h1)) begin
      overlaps++;
      failures++;
      $display("FAIL phases overlap at %0t", $time);
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    for (int i = 0; i < 200; i++) begin
      #(1 + ($urandom % 20));
      clk = ~clk;
      #1;
      checks += 6;
      if (p0 !== clk)  begin failures++; $display("FAIL phi0 != clk at %0t", $time); end
      if (p1 !== ~clk) begin failures++; $display("FAIL phi1 != ~clk at %0t", $time); end
      if (p0n !== ~p0 || p1n !== ~p1) begin failures++; $display("FAIL complement"); end
      if (h0 !== clk)  begin failures++; $display("FAIL HL phi0"); end
      if (h1 !== ~clk) begin failures++; $display("FAIL HL phi1"); end
      if (h0n !== ~h0 || h1n !== ~h1) begin failures++; $display("FAIL HL complement"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
