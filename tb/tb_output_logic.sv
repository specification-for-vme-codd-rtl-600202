// Self-checking testbench for output_logic.
// Checks the Cal-RF source selection, one Cal-Trig per /Cal-Gen falling edge,
// one Ext-Trig per /Ext.Trig falling edge, ADC Trig following bunch_det, and a
// Synch-Trig either from the re-synchroniser or on the first DDS-RF rising
// edge after an injection trigger.
module tb_output_logic;
  logic clk = 0, rst_n = 0;
  logic cal_rf = 0, int_cal_rf = 0, int_cal = 0, cal_gen_n = 1, ext_trig_n = 1;
  logic inj_trig = 0, dds_rf = 0, resync_pulse = 0, bunch_det = 0;
  logic cal_rf_out, cal_trig, adc_trig, ext_trig_out, synch_trig;
  int checks = 0, failures = 0, cyc = 0;
  int n_cal = 0, n_ext = 0, n_adc = 0, n_sync = 0;

  output_logic dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; dds_rf <= ((cyc + 1) % 16) < 8; end
  always @(posedge clk) if (rst_n) begin
    n_cal  <= n_cal + int'(cal_trig);
    n_ext  <= n_ext + int'(ext_trig_out);
    n_adc  <= n_adc + int'(adc_trig);
    n_sync <= n_sync + int'(synch_trig);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      cal_rf = 1'($urandom); int_cal_rf = 1'($urandom); int_cal = 1'($urandom);
      #1 check(cal_rf_out == (int_cal ? int_cal_rf : cal_rf), "Cal-RF selection");
      @(negedge clk);
    end
    // 3 calibration pulses, each held low several cycles
    repeat (3) begin cal_gen_n = 0; repeat (4) @(negedge clk); cal_gen_n = 1; repeat (3) @(negedge clk); end
    // 2 external triggers
    repeat (2) begin ext_trig_n = 0; repeat (2) @(negedge clk); ext_trig_n = 1; repeat (2) @(negedge clk); end
    // 4 bunch detections
    repeat (4) begin bunch_det = 1; @(negedge clk); bunch_det = 0; @(negedge clk); end
    repeat (3) @(negedge clk);
    $display("counts cal=%0d ext=%0d adc=%0d sync=%0d", n_cal, n_ext, n_adc, n_sync);
    check(n_cal == 3, "Cal-Trig count");
    check(n_ext == 2, "Ext-Trig count");
    check(n_adc == 4, "ADC Trig count");
    check(n_sync == 0, "no Synch-Trig yet");
    // resynchroniser pulse passes
    resync_pulse = 1; @(negedge clk); resync_pulse = 0; @(negedge clk);
    check(n_sync == 1, "Synch-Trig from re-synchroniser");
    // injection: sync on next DDS-RF rising edge
    begin
      int t0, t1;
      logic rf_d;
      while (dds_rf) @(negedge clk);
      inj_trig = 1; @(negedge clk); inj_trig = 0;
      t0 = cyc;
      while (!synch_trig) @(negedge clk);
      t1 = cyc;
      // the edge comes when dds_rf turns 1; synch_trig one cycle later
      check(dds_rf && t1 - t0 <= 17, "injection Synch-Trig after a DDS-RF edge");
      repeat (40) @(negedge clk);
      check(n_sync == 2, "one Synch-Trig per injection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
