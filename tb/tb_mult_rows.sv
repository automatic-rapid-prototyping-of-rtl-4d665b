// Self-checking testbench for mult_rows, the five adder rows of the array.
// The rows are chained combinationally (no latches) and driven with all 256
// operand pairs. After every row the value held by the bundle - final
// product bits plus the carry-save sum and carry vectors plus the ripple
// carry at weight 6 - must equal the partial products added so far:
// A*(B mod 4) after row 1, A*(B mod 8) after row 2 and A*B after rows 3-5.
// After row 5 all eight product bits must be final and equal A*B.
module tb_mult_rows;
  import mult_pkg::*;
  stage_t bar0, r1, r2, r3, r4, r5;
  int checks = 0, failures = 0;

  mult_rows dut (
    .bar0_q(bar0), .bar1_q(r1), .bar2_q(r2), .bar3_q(r3), .bar4_q(r4),
    .row1_d(r1), .row2_d(r2), .row3_d(r3), .row4_d(r4), .row5_d(r5)
  );

  function automatic int bundle_value(stage_t s, int final_bits);
    int v = 0;
    for (int w = 0; w < final_bits; w++) v += int'(s.p[w]) << w;
    for (int w = 0; w < PW; w++) v += (int'(s.s[w]) << w) + (int'(s.c[w]) << w);
    v += int'(s.r) << 6;
    return v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        bar0 = '0;
        bar0.a = 4'(x);
        bar0.b = 4'(y);
        #1;
        check("row1", bundle_value(r1, 1), x * (y % 4));
        check("row2", bundle_value(r2, 2), x * (y % 8));
        check("row3", bundle_value(r3, 3), x * y);
        check("row4", bundle_value(r4, 6), x * y);
        check("row5 p", int'(r5.p), x * y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
