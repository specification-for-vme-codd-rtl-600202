// End-to-end testbench for codd_sync_top, at the top's default parameters.
// It plays one machine cycle:
//   program the frequency tables (bank 5: injection, bank 2: after the
//   gymnastics trigger), ELFT selects bank 5, C0 starts the B-count;
//   /Cal-Start: calibration, f_synch = CAL-RF (then the internal
//   calibration RF), calibration pulses, while the
//   PLL locks to the shifted PS-RF whose frequency is 0.5 % off the program;
//   /Cal-Stop: f_synch = f_b-RF;
//   injection: the PLL reference moves to the PU signal (no phase jump), the
//   Synch trigger starts the 10 Gate & BLR generators: 5 give BLR pulses in
//   every bucket, 5 give two-turn gates at their bunch phases, one of them
//   started by the External trigger;
//   one BLR module is disabled for two revolutions;
//   gymnastics (bunch splitting, h 8 -> 16): a bank trigger switches the
//   PDFP bank to a program at twice the frequency, the beam signals double
//   in frequency, the generators get h = 16, the PLL relocks, and /Resynch
//   re-synchronises on the next bunch seen by the comparator; the gates must
//   keep their turn spacing with half-length buckets.
// Every mechanism is counted and must happen at least once; the outputs are
// checked against numbers derived from the settings.
module tb_codd_sync_top;
  import codd_pkg::*;
  localparam int PER = 64;                  // PS-RF period in clk cycles
  localparam int H = 8;
  localparam int REV = 16 * H * (PER / 16); // one revolution in clk cycles
  localparam logic [31:0] FTW_NOM = 32'h0400_0000;   // 2^32 / 64
  localparam logic [31:0] FTW_PROG = FTW_NOM + 32'd335544; // +0.5 %

  logic clk = 0, rst_n = 0;
  logic cal_rf = 0, ps_rf = 0, pu_sig = 0;
  logic [DAC_W-1:0] pu_amp = 0;
  logic cal_start_n = 1, cal_stop_n = 1, inj_trig = 0, cal_gen_n = 1, ext_trig_n = 1;
  logic resynch_n = 1, c0 = 0, elft = 0, b_up = 0, b_down = 0;
  logic [3:0] bank_trig = 0;
  logic ss = 0, int_cal = 0, pp = 0, soft_start = 0, soft_stop = 0, soft_inj = 0, soft_sync = 0;
  logic [SHIFT_W-1:0] rf_phase = 8;
  logic [DAC_W-1:0] threshold = 12'd400;
  logic [R_W-1:0] resynch_r = 2;
  logic pll_en = 0, tbl_wr_en = 0;
  logic [2:0] tbl_wr_bank = 0, inj_bank = 0, pdfp_bank;
  logic [9:0] tbl_wr_addr = 0;
  logic [31:0] tbl_wr_data = 0, ftw_eff;
  logic [3:0][2:0] bank_map = '{3'd0, 3'd0, 3'd0, 3'd2};
  gen_regs_t [N_GEN-1:0] gen_regs;
  logic [N_GEN-1:0] gen_blr_out, gen_gate_out, gen_window, gen_locked, gen_armed;
  logic [N_GEN-1:0][TURN_W-1:0] gen_turn;
  logic [31:0] dds_phase;
  logic f_synch, f_brf, rf_pu_out, synch_trig, cal_rf_out, cal_trig, adc_trig, ext_trig_out;
  logic calib, sel_pu, resync_armed;
  logic [15:0] b_count;
  logic signed [11:0] phase_err;
  logic phase_err_valid;

  codd_sync_top dut (.*);

  always #5 clk = ~clk;

  // ---- stimulus sources --------------------------------------------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int rfper = PER;   // RF period: halves when the bunches are split
  always @(posedge clk) begin
    ps_rf  <= ((cyc + 1) % rfper) < rfper / 2;
    cal_rf <= ((cyc + 1) % 40) < 20;
    // PU signal: the PS-RF delayed as the phase shifter delays it (9 cycles)
    pu_sig <= ((cyc + 1 - 9 + PER) % rfper) < rfper / 2;
    pu_amp <= (((cyc + 1 - 9 + PER) % rfper) < 6) ? 12'd800 : 12'd30;
  end

  // ---- mechanism counters -------------------------------------------------
  int n_cal_trig = 0, n_adc = 0, n_sync = 0, n_ext = 0, n_err = 0, n_calib = 0;
  int n_blr[N_GEN], n_gate[N_GEN], hi_gate[N_GEN], rise_gate[N_GEN], last_rise[N_GEN];
  logic [N_GEN-1:0] blr_d = 0, gate_d = 0;
  always @(posedge clk) if (rst_n) begin
    n_cal_trig <= n_cal_trig + int'(cal_trig);
    n_adc      <= n_adc + int'(adc_trig);
    n_sync     <= n_sync + int'(synch_trig);
    n_ext      <= n_ext + int'(ext_trig_out);
    n_err      <= n_err + int'(phase_err_valid);
    n_calib    <= n_calib + int'(calib);
    blr_d <= gen_blr_out; gate_d <= gen_gate_out;
    for (int g = 0; g < N_GEN; g++) begin
      if (gen_blr_out[g] && !blr_d[g]) n_blr[g] <= n_blr[g] + 1;
      if (gen_gate_out[g] && !gate_d[g]) begin
        n_gate[g] <= n_gate[g] + 1;
        if (n_gate[g] == 0) rise_gate[g] <= cyc;
        last_rise[g] <= cyc;
      end
      if (gen_gate_out[g]) hi_gate[g] <= hi_gate[g] + 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask
  task automatic mech(input string what, input int n);
    checks++;
    $display("mechanism %-34s happened %0d times", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  // phase error seen over a window: largest magnitude
  task automatic max_err(input int n, output int m);
    m = 0;
    repeat (n) begin
      @(negedge clk);
      if (phase_err_valid) begin
        int e = int'(phase_err);
        if (e < 0) e = -e;
        if (e > m) m = e;
      end
    end
  endtask

  int m, b_pulses = 0, bank_switches = 0, smooth = 0, sync_before, n_intcal = 0;
  int b_at_inj[N_GEN];
  int relock = 0, blr_off = 0, g_before[N_GEN], h_before[N_GEN], b_before;
  int rev_at_sync;

  initial begin
    for (int g = 0; g < N_GEN; g++) begin
      n_blr[g] = 0; n_gate[g] = 0; hi_gate[g] = 0; rise_gate[g] = 0; last_rise[g] = 0;
      gen_regs[g] = '0;
      gen_regs[g].h = H_W'(H);
      if (g < 5) begin
        // BLR modules: every bucket, phase g, 3 ticks
        gen_regs[g].mask_en   = 16'h003F;
        gen_regs[g].blr_phase = {5'd0, 4'(g)};
        gen_regs[g].blr_len   = 6'd3;
      end else begin
        // Gate modules: bucket g-5, phase 8, 12 ticks, turns Start..Start+2
        gen_regs[g].mask_en    = (g == 9) ? 16'h0060 : 16'h0020;
        gen_regs[g].gate_phase = {5'(g - 5), 4'd8};
        gen_regs[g].gate_len   = 6'd12;
        gen_regs[g].start_turn = 16'(g - 4);
        gen_regs[g].stop_turn  = 16'(g - 4 + 2);
      end
    end
    wait_cycles(3); rst_n = 1;
    // frequency tables: bank 5 for injection, bank 2 after the gymnastics trigger
    for (int b = 0; b < 8; b++)
      for (int a = 0; a < 1024; a++) begin
        tbl_wr_en = 1; tbl_wr_bank = 3'(b); tbl_wr_addr = 10'(a);
        tbl_wr_data = (b == 5) ? FTW_PROG : (b == 2) ? 2 * FTW_PROG : 32'h0;
        @(negedge clk);
      end
    tbl_wr_en = 0;
    // previous cycle: ELFT selects the injection bank
    inj_bank = 5; elft = 1; @(negedge clk); elft = 0; @(negedge clk);
    check(pdfp_bank == 5, "injection bank at ELFT");
    // C0: B-count starts; calibration starts; PLL on
    c0 = 1; @(negedge clk); c0 = 0;
    cal_start_n = 0; @(negedge clk); cal_start_n = 1;
    pll_en = 1;
    for (int k = 0; k < 400; k++) begin
      // B-train pulses and calibration pulses during calibration
      b_up = (k % 3 == 0); @(negedge clk); b_up = 0;
      if (k % 8 == 0) begin b_down = 1; @(negedge clk); b_down = 0; end
      if (k % 100 == 50) begin cal_gen_n = 0; wait_cycles(3); cal_gen_n = 1; end
      wait_cycles(50);
    end
    check(calib, "still in calibration");
    check(b_count > 16'd50, "B-count follows the B-train");
    b_pulses = int'(b_count);
    // f_synch is the calibration RF
    begin
      int bad = 0;
      logic crf;
      repeat (200) begin crf = cal_rf_out; @(negedge clk); if (f_synch != crf) bad++; end
      check(bad == 0, "f_synch = CAL-RF during calibration");
    end
    // internal calibration RF (test source) on f_synch
    int_cal = 1; wait_cycles(4);
    begin
      int bad = 0;
      logic crf;
      repeat (600) begin
        crf = cal_rf_out; @(negedge clk);
        if (f_synch != crf) bad++;
        if (cal_rf_out != dut.u_mux.int_cal_rf) bad++;
        if (f_synch) n_intcal++;
      end
      check(bad == 0, "f_synch = INT CAL-RF with Int.Cal");
    end
    int_cal = 0; wait_cycles(4);
    // the PLL must be locked to the shifted PS-RF by now
    max_err(20 * PER, m);
    $display("phase error on PS-RF after lock: max %0d cycles, ftw_eff=%h", m, ftw_eff);
    check(m <= 2, "PLL locked to PS-RF");
    check(ftw_eff > FTW_NOM - 32'd20000 && ftw_eff < FTW_NOM + 32'd20000, "integrator took up the 0.5 % offset");
    // C100
    cal_stop_n = 0; @(negedge clk); cal_stop_n = 1; wait_cycles(3);
    check(!calib, "calibration over");
    begin
      int bad = 0;
      logic brf;
      repeat (300) begin brf = f_brf; @(negedge clk); if (f_synch != brf) bad++; end
      check(bad == 0, "f_synch = f_b-RF after C100");
    end
    // injection
    for (int g = 0; g < N_GEN; g++) b_at_inj[g] = n_blr[g];
    sync_before = n_sync;
    inj_trig = 1; wait_cycles(2); inj_trig = 0;
    wait_cycles(2 * PER);
    check(sel_pu, "PLL reference on PU after injection");
    check(n_sync == sync_before + 1, "Synch-Trig at injection");
    max_err(10 * PER, m);
    $display("phase error after the switch to PU: max %0d cycles", m);
    check(m <= 2, "smooth PS-RF to PU transition");
    if (m <= 2) smooth++;
    // External trigger for generator 9, 1 revolution after injection
    wait_cycles(REV - 3 * PER);
    ext_trig_n = 0; wait_cycles(2); ext_trig_n = 1;
    // let the gates run: up to turn 7
    wait_cycles(9 * REV);
    for (int g = 5; g < N_GEN; g++) begin
      $display("gate module %0d: %0d gates, %0d high cycles", g, n_gate[g], hi_gate[g]);
      check(n_gate[g] == 2, $sformatf("module %0d: two gates (Stop = Start + 2)", g));
      check(hi_gate[g] == 2 * 12 * (PER / 16), $sformatf("module %0d: gate length", g));
    end
    // gate modules 5..8 started by the same trigger, one turn apart:
    // first gate offset = one revolution + one bucket
    for (int g = 6; g < 9; g++)
      check(rise_gate[g] - rise_gate[g - 1] == REV + 16 * (PER / 16),
            $sformatf("module %0d gate position", g));
    for (int g = 0; g < 5; g++) begin
      // BLR free running since injection: 8 per revolution
      check(n_blr[g] >= 8 * 9, $sformatf("module %0d: BLR in every bucket (%0d)", g, n_blr[g]));
      // since injection the modules differ only in phase: counts within one
      check((n_blr[g] - b_at_inj[g]) - (n_blr[0] - b_at_inj[0]) <= 1 &&
            (n_blr[0] - b_at_inj[0]) - (n_blr[g] - b_at_inj[g]) <= 1,
            $sformatf("BLR modules agree (%0d vs %0d)", n_blr[g] - b_at_inj[g], n_blr[0] - b_at_inj[0]));
    end
    // BLR disabled for special operations: module 0 off for two revolutions
    gen_regs[0].mask_en[EM_ENABLE] = 1'b0;
    wait_cycles(REV / 4);
    b_before = n_blr[0];
    wait_cycles(2 * REV);
    check(n_blr[0] == b_before && n_blr[1] > b_before, "BLR disabled on module 0 only");
    if (n_blr[0] == b_before) blr_off++;
    gen_regs[0].mask_en[EM_ENABLE] = 1'b1;
    // RF gymnastics (bunch splitting, h 8 -> 16): the bank trigger loads the
    // new frequency program (twice the RF frequency), the software sets the
    // new harmonic number, the PLL relocks, then /Resynch realigns the
    // generators on one of the bunches
    bank_trig = 4'b0001; @(negedge clk); bank_trig = 0; @(negedge clk);
    check(pdfp_bank == 2, "bank switch on gymnastics trigger");
    if (pdfp_bank == 2) bank_switches++;
    while (((cyc + 1) % PER) != 0) @(negedge clk);
    rfper = PER / 2;
    for (int g = 0; g < N_GEN; g++) gen_regs[g].h = H_W'(2 * H);
    wait_cycles(300 * PER / 2);
    max_err(20 * PER / 2, m);
    $display("phase error after the harmonic change: max %0d cycles, ftw_eff=%h", m, ftw_eff);
    check(m <= 2, "PLL relocked at the new harmonic");
    check(ftw_eff > 2 * FTW_NOM - 32'd40000 && ftw_eff < 2 * FTW_NOM + 32'd40000, "PLL at twice the frequency");
    if (m <= 2) relock++;
    for (int g = 0; g < N_GEN; g++) begin g_before[g] = n_gate[g]; h_before[g] = hi_gate[g]; end
    sync_before = n_sync;
    resynch_n = 0; wait_cycles(2); resynch_n = 1;
    wait_cycles(3 * PER);
    check(n_sync == sync_before + 1 && !resync_armed, "re-synchronised on a bunch");
    b_before = n_blr[1];
    wait_cycles(REV);
    $display("BLR pulses in one revolution at h=16: %0d", n_blr[1] - b_before);
    check(n_blr[1] - b_before == 2 * H, "BLR in each of the 16 buckets");
    wait_cycles(7 * REV);
    for (int g = 5; g < 9; g++) begin
      check(n_gate[g] - g_before[g] == 2, $sformatf("module %0d: two gates after resync", g));
      check(hi_gate[g] - h_before[g] == 2 * 12 * (PER / 32), $sformatf("module %0d: gate length at h=16", g));
    end
    // same turn offsets as before; a bucket is now half as long
    for (int g = 6; g < 9; g++)
      check(last_rise[g] - last_rise[g - 1] == REV + 16 * (PER / 32),
            $sformatf("module %0d gate position at h=16", g));
    max_err(10 * PER, m);
    check(m <= 2, "PLL stays locked");
    check(&gen_locked, "all generator loops locked");

    mech("calibration (CAL-RF on f_synch)", n_calib);
    mech("calibration trigger (Cal-Trig)", n_cal_trig);
    mech("B-train counting", b_pulses);
    mech("phase error words", n_err);
    mech("PS-RF to PU switch without jump", smooth);
    mech("Synch-Trig (injection + resync)", n_sync);
    mech("bunch detection (ADC Trig)", n_adc);
    mech("External trigger", n_ext);
    mech("PDFP bank switch", bank_switches);
    mech("internal calibration RF (Int.Cal)", n_intcal);
    mech("harmonic change and PLL relock", relock);
    mech("BLR disabled", blr_off);
    mech("BLR pulses (module 0)", n_blr[0]);
    mech("gates (module 5)", n_gate[5]);
    mech("gates started by External trigger (9)", n_gate[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
