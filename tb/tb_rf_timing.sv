// Self-checking testbench for rf_timing.
// Plays a machine cycle: /Cal-Start (C0) opens calibration, /Cal-Stop (C100)
// closes it, the injection trigger moves the PLL to the PU signal, but only on
// the next RF rising edge; a new /Cal-Start goes back to PS-RF. The software
// strobes are checked the same way.
module tb_rf_timing;
  logic clk = 0, rst_n = 0;
  logic cal_start_n = 1, cal_stop_n = 1, inj_trig = 0;
  logic soft_start = 0, soft_stop = 0, soft_inj = 0, rf_edge = 0;
  logic calib, sel_pu;
  int checks = 0, failures = 0;

  rf_timing dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic pulse(ref logic s, input logic active);
    s = active; @(negedge clk); s = ~active; @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    check(!calib && !sel_pu, "reset state");
    // a held-low /Cal-Start acts once
    cal_start_n = 0; repeat (5) @(negedge clk);
    check(calib && !sel_pu, "calibration after C0");
    cal_start_n = 1; @(negedge clk);
    pulse(cal_stop_n, 0);
    check(!calib && !sel_pu, "PS-RF after C100");
    pulse(inj_trig, 1);
    repeat (5) @(negedge clk);
    check(!sel_pu, "PU waits for an RF edge");
    rf_edge = 1; @(negedge clk); rf_edge = 0; @(negedge clk);
    check(sel_pu, "PU after injection and RF edge");
    pulse(cal_stop_n, 0);
    check(sel_pu, "stop does not leave PU");
    pulse(cal_start_n, 0);
    check(calib && !sel_pu, "new cycle: calibration, PS-RF");
    // software strobes
    pulse(soft_stop, 1);
    check(!calib, "soft stop");
    pulse(soft_inj, 1);
    rf_edge = 1; @(negedge clk); rf_edge = 0; @(negedge clk);
    check(sel_pu, "soft injection");
    pulse(soft_start, 1);
    check(calib && !sel_pu, "soft start");
    // an injection during calibration is remembered and applied on the RF edge
    pulse(inj_trig, 1);
    check(calib && !sel_pu, "injection waits during calibration");
    rf_edge = 1; @(negedge clk); rf_edge = 0; @(negedge clk);
    check(calib && sel_pu, "PU selected on RF edge");
    // a held-low /Cal-Stop acts once, and rf edges alone change nothing
    cal_stop_n = 0; repeat (4) @(negedge clk); cal_stop_n = 1; @(negedge clk);
    check(!calib && sel_pu, "calibration closed");
    repeat (3) begin rf_edge = 1; @(negedge clk); rf_edge = 0; @(negedge clk); end
    check(!calib && sel_pu, "stable without events");
    // Cal-Start and Cal-Stop together: start wins
    cal_start_n = 0; cal_stop_n = 0; @(negedge clk); cal_start_n = 1; cal_stop_n = 1; @(negedge clk);
    check(calib && !sel_pu, "start has priority over stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
