// VME RF-Mux and Synchronizer.
// Chooses the reference of the f_b-RF PLL and the f_synch signal sent to the
// Gate & BLR generators, and produces the Synch trigger that aligns them to a
// bunch. Following the specification: the PS-RF (or, for tests, the internal
// clock, selected by SS) passes a 5-bit phase shifter; the PLL reference
// rf_pu_out is the shifted PS-RF until injection and the PU signal after it;
// f_synch is the calibration RF (external or internal, Int.Cal) between C0 and
// C100 and the PLL output DDS-RF otherwise; the re-synchroniser uses the
// comparator (12-bit threshold, polarity PP) and the 6-bit value R.
// The specification also says the PLL locks to the PS-RF during calibration,
// so calibration RF switches only f_synch, not the PLL reference.
// The detailed behaviour of the timing, comparator, re-synchroniser and output
// logic sub-blocks is this design's; see their files.
// Timing: one clk domain; RF inputs are sampled levels; rf_pu_out and f_synch
// are registered.
module rf_mux_synchronizer
  import codd_pkg::*;
#(
  parameter int INT_DIV = 64,
  parameter int CAL_DIV = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // RF inputs
  input  logic               cal_rf,
  input  logic               ps_rf,
  input  logic               pu_sig,
  input  logic [DAC_W-1:0]   pu_amp,
  input  logic               dds_rf,
  // timings and triggers
  input  logic               cal_start_n,
  input  logic               cal_stop_n,
  input  logic               inj_trig,
  input  logic               cal_gen_n,
  input  logic               ext_trig_n,
  input  logic               resynch_n,
  // control registers
  input  logic               ss,
  input  logic               int_cal,
  input  logic [SHIFT_W-1:0] rf_phase,
  input  logic [DAC_W-1:0]   threshold,
  input  logic               pp,
  input  logic [R_W-1:0]     resynch_r,
  input  logic               soft_start,
  input  logic               soft_stop,
  input  logic               soft_inj,
  input  logic               soft_sync,
  // outputs
  output logic               rf_pu_out,
  output logic               f_synch,
  output logic               cal_rf_out,
  output logic               cal_trig,
  output logic               adc_trig,
  output logic               ext_trig_out,
  output logic               synch_trig,
  output logic               calib,
  output logic               sel_pu,
  output logic               resync_armed
);
  logic int_clk, int_cal_rf, ps_src, shifted, sh_d, det;
  logic resync_pulse, bunch_det;

  int_rf_sources #(.INT_DIV(INT_DIV), .CAL_DIV(CAL_DIV)) u_int (
    .clk, .rst_n, .int_clk, .int_cal_rf
  );

  assign ps_src = ss ? int_clk : ps_rf;

  rf_shifter #(.PH_W(SHIFT_W)) u_shift (
    .clk, .rst_n, .rf_in(ps_src), .ph(rf_phase), .rf_out(shifted)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) sh_d <= 1'b0;
    else        sh_d <= shifted;
  end

  rf_timing u_timing (
    .clk, .rst_n, .cal_start_n, .cal_stop_n, .inj_trig, .soft_start, .soft_stop,
    .soft_inj, .rf_edge(shifted & ~sh_d), .calib, .sel_pu
  );

  bunch_comparator #(.DAC_W(DAC_W)) u_comp (
    .clk, .rst_n, .pu_amp, .threshold, .pp, .det
  );

  resynchroniser #(.R_W(R_W)) u_resync (
    .clk, .rst_n, .resynch_n, .soft_sync, .det, .dds_rf, .r(resynch_r),
    .sync_pulse(resync_pulse), .bunch_det, .armed(resync_armed)
  );

  output_logic u_out (
    .clk, .rst_n, .cal_rf, .int_cal_rf, .int_cal, .cal_gen_n, .ext_trig_n,
    .inj_trig, .dds_rf, .resync_pulse, .bunch_det, .cal_rf_out, .cal_trig,
    .adc_trig, .ext_trig_out, .synch_trig
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rf_pu_out <= 1'b0; f_synch <= 1'b0;
    end else begin
      rf_pu_out <= sel_pu ? pu_sig : shifted;
      f_synch   <= calib ? cal_rf_out : dds_rf;
    end
  end
endmodule
