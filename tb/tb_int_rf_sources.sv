// Self-checking testbench for int_rf_sources.
// Measures, at default parameters, the period of int_clk (expected INT_DIV =
// 64 cycles), its duty cycle, and the period of int_cal_rf (expected
// CAL_DIV * INT_DIV = 256 cycles).
module tb_int_rf_sources;
  logic clk = 0, rst_n = 0, int_clk, int_cal_rf;
  int checks = 0, failures = 0;
  int c = 0, ci_last = -1, cc_last = -1, hi = 0;
  logic ci_d = 0, cc_d = 0;

  int_rf_sources dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, c); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2000) begin
      @(negedge clk); c++;
      if (int_clk) hi++;
      if (int_clk && !ci_d) begin
        if (ci_last >= 0) check(c - ci_last == 64, "int_clk period");
        ci_last = c;
      end
      if (int_cal_rf && !cc_d) begin
        if (cc_last >= 0) check(c - cc_last == 256, "int_cal_rf period");
        cc_last = c;
      end
      ci_d = int_clk; cc_d = int_cal_rf;
    end
    check(hi >= 990 && hi <= 1010, "int_clk duty cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
