// Self-checking testbench for fa_cell. Both translations (FA1B macro with an
// extra inverter, and two ACT-1 modules with one inverter) are checked over
// all eight input combinations against A + B + Ci, remembering that the
// carry in, carry out and sum of the cell are active low.
module tb_fa_cell;
  logic a, b, ci_n;
  logic co_n0, sum_n0, co_n1, sum_n1;
  int checks = 0, failures = 0;

  fa_cell #(.STYLE(0)) dut_fa1b (.a(a), .b(b), .ci_n(ci_n), .co_n(co_n0), .sum_n(sum_n0));
  fa_cell #(.STYLE(1)) dut_mxt  (.a(a), .b(b), .ci_n(ci_n), .co_n(co_n1), .sum_n(sum_n1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 8; i++) begin
      a = i[0]; b = i[1]; ci_n = ~i[2];
      #1;
      total = int'(i[0]) + int'(i[1]) + int'(i[2]);
      checks += 4;
      if (co_n0  !== ~(total >= 2))      begin failures++; $display("FAIL FA1B carry %0d", i); end
      if (sum_n0 !== ~(total % 2 == 1))  begin failures++; $display("FAIL FA1B sum %0d", i);   end
      if (co_n1  !== ~(total >= 2))      begin failures++; $display("FAIL MXT carry %0d", i);  end
      if (sum_n1 !== ~(total % 2 == 1))  begin failures++; $display("FAIL MXT sum %0d", i);    end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
