// Self-checking testbench for c_element, both the storage-element form
// (STYLE 0) and the two-module feedback form (STYLE 1), driven in parallel. After a reset the inputs are driven
// at random; a reference state is kept by the rule "take the inputs' value
// when they agree, otherwise hold". Reset is also re-applied at random
// moments, whatever the inputs, and must force the output low. out_n must
// always be the inverse of out.
module tb_c_element;
  logic reset, i1, i2, out, out_n, out1, out1_n;
  logic ref_st;
  int checks = 0, failures = 0;
  int rises = 0, holds = 0;

  c_element #(.STYLE(0)) dut  (.reset(reset), .i1(i1), .i2(i2), .out(out),  .out_n(out_n));
  c_element #(.STYLE(1)) dut1 (.reset(reset), .i1(i1), .i2(i2), .out(out1), .out_n(out1_n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; i1 = 1'b1; i2 = 1'b1; #1;
    ref_st = 1'b0;
    checks += 2;
    if (out !== 1'b0)  begin failures++; $display("FAIL reset did not clear"); end
    if (out1 !== 1'b0) begin failures++; $display("FAIL reset did not clear (STYLE 1)"); end
    reset = 1'b0; #1;
    for (int i = 0; i < 400; i++) begin
      reset = ($urandom % 50 == 0);
      i1 = 1'($urandom);
      i2 = 1'($urandom);
      #1;
      if (reset)         ref_st = 1'b0;
      else if (i1 == i2) begin
        if (i1 && !ref_st) rises++;
        ref_st = i1;
      end else holds++;
      checks += 2;
      if (out !== ref_st) begin
        failures++;
        $display("FAIL reset=%b i1=%b i2=%b out=%b exp=%b", reset, i1, i2, out, ref_st);
      end
      if (out_n !== ~out) begin failures++; $display("FAIL out_n"); end
      checks += 2;
      if (out1 !== ref_st) begin
        failures++;
        $display("FAIL STYLE1 reset=%b i1=%b i2=%b out=%b exp=%b", reset, i1, i2, out1, ref_st);
      end
      if (out1_n !== ~out1) begin failures++; $display("FAIL STYLE1 out_n"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
