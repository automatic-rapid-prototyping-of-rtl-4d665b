// Self-checking testbench for smo_multiplier, the synchronous pipelined
// multiplier. The testbench makes two non-overlapping phases itself (period
// 20, with a gap of one time unit between phases) and applies a new random
// operand pair every period, just after phi0 rises. Operands captured at
// rise n of phi0 must appear as their product at p right after rise n+5:
// the five-period latency and the throughput of one product per period are
// both checked, and the product must not be there one period early.
// A second instance built with the FA1B full-adder translation runs on the
// same inputs and must give the same products.
module tb_smo_multiplier;
  import mult_pkg::*;
  logic phi0, phi1;
  logic [N-1:0]  a, b;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;
  int early = 0;
  logic [PW-1:0] expq [$];

  smo_multiplier dut (.phi0(phi0), .phi1(phi1), .a(a), .b(b), .p(p));

  logic [PW-1:0] p_fa1b;
  smo_multiplier #(.FA_STYLE(0)) dut_fa1b (.phi0(phi0), .phi1(phi1), .a(a), .b(b), .p(p_fa1b));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PW-1:0] e;
    phi0 = 1'b0; phi1 = 1'b0;
    a = '0; b = '0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      #1 phi1 = 1'b1;            // master latches open
      #9 phi1 = 1'b0;
      #1 phi0 = 1'b1;            // rise number cyc: bar 0 captures a/b
      expq.push_back(PW'(a) * PW'(b));
      #1;
      if (expq.size() == 6) begin
        e = expq.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          $display("FAIL cycle %0d p=%0d exp=%0d", cyc, p, e);
        end
        checks++;
        if (p_fa1b !== e) begin
          failures++;
          $display("FAIL FA1B instance cycle %0d p=%0d exp=%0d", cyc, p_fa1b, e);
        end
        // latency: the next product must not be visible yet
        if (expq[0] != e && p == expq[0]) early++;
      end
      a = 4'($urandom);
      b = 4'($urandom);
      #7 phi0 = 1'b0;
    end
    checks++;
    if (early != 0) begin
      failures++;
      $display("FAIL product appeared early %0d times", early);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
