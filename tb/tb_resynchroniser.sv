// Self-checking testbench for resynchroniser.
// DDS-RF is a square wave of 20 cycles; bunches (det pulses) arrive at
// random times. Without a request no sync pulse may appear. After /Resynch
// (or Soft Sync) the sync pulse must come on the R-th DDS-RF rising edge after
// the first bunch (edge counting starts at 0), for several values of R, one
// cycle after that edge. Every bunch gives one bunch_det pulse.
module tb_resynchroniser;
  logic clk = 0, rst_n = 0, resynch_n = 1, soft_sync = 0, det = 0, dds_rf = 0;
  logic [5:0] r = 0;
  logic sync_pulse, bunch_det, armed;
  int checks = 0, failures = 0, cyc = 0, bunches = 0, bdets = 0;

  resynchroniser dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; dds_rf <= ((cyc + 1) % 20) < 10; end
  always @(posedge clk) if (rst_n && bunch_det) bdets <= bdets + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bunch();
    det = 1; @(negedge clk); det = 0; bunches++;
  endtask

  task automatic case_r(input int rv, input bit use_soft);
    int edges = 0, t_sync = -1, t_exp = -1;
    logic rf_d;
    r = 6'(rv);
    repeat ($urandom_range(3, 30)) @(negedge clk);
    if (use_soft) begin soft_sync = 1; @(negedge clk); soft_sync = 0; end
    else begin resynch_n = 0; @(negedge clk); resynch_n = 1; end
    check(armed, "armed after request");
    repeat ($urandom_range(5, 50)) @(negedge clk);
    bunch();
    @(negedge clk);   // comparator edge seen
    rf_d = dds_rf;
    for (int t = 0; t < 20 * (rv + 3); t++) begin
      @(negedge clk);
      if (dds_rf && !rf_d) begin
        if (edges == rv) t_exp = t + 1;
        edges++;
      end
      if (sync_pulse) begin check(t_sync < 0, "single sync pulse"); t_sync = t; end
      rf_d = dds_rf;
    end
    $display("R=%0d: sync at %0d, expected %0d", rv, t_sync, t_exp);
    check(t_sync == t_exp && t_sync > 0, "sync on R-th DDS-RF edge");
    check(!armed, "disarmed after sync");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // no request: bunches give no sync
    for (int i = 0; i < 5; i++) begin
      repeat (37) @(negedge clk); bunch();
      repeat (30) begin @(negedge clk); check(!sync_pulse, "no sync without request"); end
    end
    case_r(0, 0);
    case_r(1, 0);
    case_r(5, 1);
    case_r(17, 0);
    case_r(63, 1);
    repeat (3) @(negedge clk);
    check(bdets == bunches, "one bunch_det per bunch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
