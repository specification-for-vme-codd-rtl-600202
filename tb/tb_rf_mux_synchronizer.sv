// Self-checking testbench for rf_mux_synchronizer.
// Runs one machine cycle through the module: calibration (f_synch must be the
// external, then the internal calibration RF), PS-RF after C100 (the PLL
// reference must be PS-RF delayed by the phase setting + 2 cycles, f_synch
// the DDS-RF), the internal clock as PS-RF source (SS), injection (reference
// becomes the PU signal), and a re-synchronisation on a bunch seen by the
// comparator, which must give a Synch-Trig on the R-th DDS-RF edge. Each
// output is compared with a history of the tb's own input values.
module tb_rf_mux_synchronizer;
  import codd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cal_rf = 0, ps_rf = 0, pu_sig = 0, dds_rf = 0;
  logic [DAC_W-1:0] pu_amp = 0;
  logic cal_start_n = 1, cal_stop_n = 1, inj_trig = 0, cal_gen_n = 1, ext_trig_n = 1, resynch_n = 1;
  logic ss = 0, int_cal = 0, pp = 0;
  logic [SHIFT_W-1:0] rf_phase = 0;
  logic [DAC_W-1:0] threshold = 12'd500;
  logic [R_W-1:0] resynch_r = 3;
  logic soft_start = 0, soft_stop = 0, soft_inj = 0, soft_sync = 0;
  logic rf_pu_out, f_synch, cal_rf_out, cal_trig, adc_trig, ext_trig_out, synch_trig;
  logic calib, sel_pu, resync_armed;
  int checks = 0, failures = 0, cyc = 0;
  logic h_ps[$], h_cal[$], h_pu[$], h_dds[$], h_int[$], h_icr[$];

  rf_mux_synchronizer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s at %0d", what, cyc); end
  endtask

  // one step: new input values, record them, advance one cycle
  task automatic step();
    cyc++;
    ps_rf  = (cyc % 64) < 32;
    cal_rf = (cyc % 40) < 20;
    dds_rf = ((cyc + 7) % 64) < 32;
    pu_sig = ((cyc + 13) % 64) < 6;
    pu_amp = pu_sig ? 12'd900 : 12'd20;
    h_ps.push_front(ps_rf); h_cal.push_front(cal_rf); h_pu.push_front(pu_sig);
    h_dds.push_front(dds_rf);
    h_int.push_front(dut.int_clk); h_icr.push_front(dut.int_cal_rf);
    if (h_ps.size() > 40) begin
      void'(h_ps.pop_back()); void'(h_cal.pop_back()); void'(h_pu.pop_back());
      void'(h_dds.pop_back()); void'(h_int.pop_back()); void'(h_icr.pop_back());
    end
    @(negedge clk);
  endtask

  int nsync, nadc, ncal, next;
  always @(posedge clk) if (rst_n) begin
    nsync <= nsync + int'(synch_trig); nadc <= nadc + int'(adc_trig);
    ncal  <= ncal + int'(cal_trig);    next <= next + int'(ext_trig_out);
  end

  initial begin
    nsync = 0; nadc = 0; ncal = 0; next = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (50) step();
    // C0: calibration with the external calibration RF
    cal_start_n = 0; step(); cal_start_n = 1; step(); step();
    check(calib, "calibration after /Cal-Start");
    repeat (100) begin step(); check(f_synch == h_cal[0], "f_synch = CAL-RF"); end
    // calibration pulses
    repeat (4) begin cal_gen_n = 0; step(); step(); cal_gen_n = 1; step(); step(); end
    int_cal = 1; step();
    repeat (300) begin step(); check(f_synch == h_icr[0], "f_synch = INT CAL-RF"); end
    int_cal = 0;
    // C100: PS-RF, then a phase setting
    cal_stop_n = 0; step(); cal_stop_n = 1; step(); step();
    check(!calib && !sel_pu, "PS-RF after /Cal-Stop");
    for (int p = 0; p < 32; p += 7) begin
      rf_phase = SHIFT_W'(p);
      repeat (40) step();
      repeat (100) begin
        step();
        check(rf_pu_out == h_ps[p + 1], $sformatf("reference = PS-RF shifted by %0d", p));
        check(f_synch == h_dds[0], "f_synch = DDS-RF");
      end
    end
    // SS: internal clock as source
    rf_phase = 2; ss = 1; repeat (40) step();
    repeat (200) begin step(); check(rf_pu_out == h_int[3], "reference = INT CLK"); end
    ss = 0; repeat (40) step();
    // injection: reference moves to PU after the next RF edge
    inj_trig = 1; step(); inj_trig = 0;
    repeat (70) step();
    check(sel_pu, "PU selected after injection");
    repeat (200) begin step(); check(rf_pu_out == h_pu[0], "reference = PU"); end
    check(nsync == 1, "injection Synch-Trig");
    // re-synchronisation on a bunch
    resynch_n = 0; step(); resynch_n = 1;
    check(resync_armed, "armed");
    repeat (400) step();
    check(!resync_armed && nsync == 2, "re-synchronised on bunch");
    check(nadc > 5, "ADC triggers from bunches");
    ext_trig_n = 0; step(); ext_trig_n = 1; step(); step();
    check(ncal == 4 && next == 1, "Cal-Trig and Ext-Trig");
    $display("sync=%0d adc=%0d cal=%0d ext=%0d", nsync, nadc, ncal, next);
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
