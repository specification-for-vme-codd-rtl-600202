// Self-checking testbench for vco_x16_pll (behavioural x16 loop).
// f_synchro square waves of 64, 100 and 37 clk periods: once locked, every
// period must carry exactly 16 ticks, the first on the f_synchro rising edge
// cycle, and tick gaps must stay within one cycle of period/16.
module tb_vco_x16_pll;
  logic clk = 0, rst_n = 0, f_synchro = 0, tick16, locked;
  int checks = 0, failures = 0;

  vco_x16_pll dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(input int per, input int nper);
    int ticks, gap, last;
    for (int p = 0; p < nper; p++) begin
      ticks = 0;
      for (int c = 0; c < per; c++) begin
        f_synchro = (c < per / 2);
        @(negedge clk);
        if (tick16) begin
          if (ticks > 0) begin
            gap = c - last;
            if (p >= 2) check(gap >= per / 16 - 1 && gap <= per / 16 + 2, "tick spacing");
          end
          last = c; ticks++;
        end
      end
      if (p >= 2) check(ticks == 16, $sformatf("16 ticks per period (got %0d, per=%0d)", ticks, per));
    end
    check(locked, "locked");
    $display("period %0d: last period had %0d ticks", per, ticks);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(64, 8);
    run(100, 8);
    run(37, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
