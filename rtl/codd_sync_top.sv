// CODD closed-orbit synchronisation: top level.
// The closed-orbit system integrates pick-up signals bunch by bunch, so its
// integrators need Gate and Base Line Restoration (BLR) pulses that stay in
// phase with the beam through the whole cycle, including harmonic changes.
// The chain is:
//   rf_mux_synchronizer  picks the PLL reference (shifted PS-RF before
//                        injection, PU signal after), picks f_synch
//                        (calibration RF between C0 and C100, f_b-RF else)
//                        and makes the Synch trigger;
//   f_b-RF PLL           phase_discriminator_adc -> dds, whose frequency
//                        word comes from pdfp (B-train count) reading the
//                        active bank of pdfp_ctrl;
//   N_GEN Gate & BLR     gate_blr_generator x 10 (5 used for BLR, 5 for
//   generators           Gates), all driven by f_synch, the Synch trigger and
//                        the Ext-Trig output.
// The block structure, counts and register widths follow the specification;
// the single clk domain with sampled RF levels, the digital PLL, and the
// register ports in place of a VME interface are this design's choices.
// Timing: everything is synchronous to clk with synchronous active-low reset.
module codd_sync_top
  import codd_pkg::*;
#(
  parameter int N_G      = N_GEN,
  parameter int ACC_W    = 32,
  parameter int ERR_W    = 12,
  parameter int TBL_AW   = 10,
  parameter int N_PTRIG  = 4,
  parameter int KP_SH    = 18,
  parameter int KI_SH    = 14,
  parameter int INT_DIV  = 64,
  parameter int CAL_DIV  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // RF inputs
  input  logic                     cal_rf,
  input  logic                     ps_rf,
  input  logic                     pu_sig,
  input  logic [DAC_W-1:0]         pu_amp,
  // timings (TG8) and triggers
  input  logic                     cal_start_n,
  input  logic                     cal_stop_n,
  input  logic                     inj_trig,
  input  logic                     cal_gen_n,
  input  logic                     ext_trig_n,
  input  logic                     resynch_n,
  input  logic                     c0,
  input  logic                     elft,
  input  logic [N_PTRIG-1:0]       bank_trig,
  input  logic                     b_up,
  input  logic                     b_down,
  // RF-Mux and Synchronizer registers
  input  logic                     ss,
  input  logic                     int_cal,
  input  logic [SHIFT_W-1:0]       rf_phase,
  input  logic [DAC_W-1:0]         threshold,
  input  logic                     pp,
  input  logic [R_W-1:0]           resynch_r,
  input  logic                     soft_start,
  input  logic                     soft_stop,
  input  logic                     soft_inj,
  input  logic                     soft_sync,
  // PLL and PDFP-CTRL registers
  input  logic                     pll_en,
  input  logic                     tbl_wr_en,
  input  logic [2:0]               tbl_wr_bank,
  input  logic [TBL_AW-1:0]        tbl_wr_addr,
  input  logic [ACC_W-1:0]         tbl_wr_data,
  input  logic [2:0]               inj_bank,
  input  logic [N_PTRIG-1:0][2:0]  bank_map,
  // Gate & BLR generator registers
  input  gen_regs_t [N_G-1:0]      gen_regs,
  // outputs
  output logic [N_G-1:0]           gen_blr_out,
  output logic [N_G-1:0]           gen_gate_out,
  output logic [N_G-1:0]           gen_window,
  output logic [N_G-1:0]           gen_locked,
  output logic [N_G-1:0]           gen_armed,
  output logic [N_G-1:0][TURN_W-1:0] gen_turn,
  output logic                     f_synch,
  output logic                     f_brf,
  output logic                     rf_pu_out,
  output logic                     synch_trig,
  output logic                     cal_rf_out,
  output logic                     cal_trig,
  output logic                     adc_trig,
  output logic                     ext_trig_out,
  output logic                     calib,
  output logic                     sel_pu,
  output logic                     resync_armed,
  output logic [2:0]               pdfp_bank,
  output logic [15:0]              b_count,
  output logic signed [ERR_W-1:0]  phase_err,
  output logic                     phase_err_valid,
  output logic [ACC_W-1:0]         ftw_eff,
  output logic [ACC_W-1:0]         dds_phase
);
  logic [TBL_AW-1:0] tbl_addr;
  logic [ACC_W-1:0]  tbl_data, ftw;

  rf_mux_synchronizer #(.INT_DIV(INT_DIV), .CAL_DIV(CAL_DIV)) u_mux (
    .clk, .rst_n, .cal_rf, .ps_rf, .pu_sig, .pu_amp, .dds_rf(f_brf),
    .cal_start_n, .cal_stop_n, .inj_trig, .cal_gen_n, .ext_trig_n, .resynch_n,
    .ss, .int_cal, .rf_phase, .threshold, .pp, .resynch_r,
    .soft_start, .soft_stop, .soft_inj, .soft_sync,
    .rf_pu_out, .f_synch, .cal_rf_out, .cal_trig, .adc_trig, .ext_trig_out,
    .synch_trig, .calib, .sel_pu, .resync_armed
  );

  phase_discriminator_adc #(.ERR_W(ERR_W)) u_pd (
    .clk, .rst_n, .ref_in(rf_pu_out), .fb(f_brf), .err(phase_err),
    .err_valid(phase_err_valid)
  );

  pdfp_ctrl #(.N_BANKS(N_BANKS), .ADDR_W(TBL_AW), .DATA_W(ACC_W), .N_TRIG(N_PTRIG)) u_ctrl (
    .clk, .rst_n, .wr_en(tbl_wr_en), .wr_bank(tbl_wr_bank), .wr_addr(tbl_wr_addr),
    .wr_data(tbl_wr_data), .elft, .inj_bank, .ext_trig(bank_trig), .bank_map,
    .rd_addr(tbl_addr), .rd_data(tbl_data), .bank(pdfp_bank)
  );

  pdfp #(.B_W(16), .ADDR_W(TBL_AW), .B_SHIFT(0), .DATA_W(ACC_W)) u_pdfp (
    .clk, .rst_n, .b_up, .b_down, .c0, .b_count, .tbl_addr, .tbl_data, .ftw
  );

  dds #(.ACC_W(ACC_W), .ERR_W(ERR_W), .KP_SH(KP_SH), .KI_SH(KI_SH)) u_dds (
    .clk, .rst_n, .ftw, .err(phase_err), .err_valid(phase_err_valid),
    .loop_en(pll_en), .f_out(f_brf), .phase(dds_phase), .ftw_eff
  );

  for (genvar g = 0; g < N_G; g++) begin : g_gen
    gate_blr_generator u_gen (
      .clk, .rst_n, .f_synchro(f_synch), .synch_trig, .ext_trig(ext_trig_out),
      .h(gen_regs[g].h), .mask_en(gen_regs[g].mask_en),
      .start_turn(gen_regs[g].start_turn), .stop_turn(gen_regs[g].stop_turn),
      .blr_phase(gen_regs[g].blr_phase), .gate_phase(gen_regs[g].gate_phase),
      .blr_len(gen_regs[g].blr_len), .gate_len(gen_regs[g].gate_len),
      .blr_out(gen_blr_out[g]), .gate_out(gen_gate_out[g]),
      .window(gen_window[g]), .turn(gen_turn[g]), .armed(gen_armed[g]),
      .locked(gen_locked[g])
    );
  end
endmodule
