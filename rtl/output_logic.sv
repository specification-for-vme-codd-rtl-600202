// Output logic of the RF-Mux and Synchronizer: forms the five module outputs.
// The specification names them (Cal-RF, Cal-Trig, ADC Trig, Ext-Trig,
// Synch-Trig); what each carries is this design's reading of the diagram:
//   cal_rf_out   calibration RF, internal (int_cal = 1) or external
//   cal_trig     one-cycle pulse on each falling edge of /Cal-Gen
//   ext_trig_out one-cycle pulse on each falling edge of /Ext.Trig
//   adc_trig     the comparator's bunch detection pulse, delayed one cycle
//   synch_trig   the re-synchroniser pulse, or, after an injection trigger,
//                a pulse on the next DDS-RF rising edge (injection sync)
// All outputs except cal_rf_out are registered one-cycle pulses.
module output_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic cal_rf,
  input  logic int_cal_rf,
  input  logic int_cal,
  input  logic cal_gen_n,
  input  logic ext_trig_n,
  input  logic inj_trig,
  input  logic dds_rf,
  input  logic resync_pulse,
  input  logic bunch_det,
  output logic cal_rf_out,
  output logic cal_trig,
  output logic adc_trig,
  output logic ext_trig_out,
  output logic synch_trig
);
  logic gen_d, ext_d, inj_d, rf_d, inj_pend;

  assign cal_rf_out = int_cal ? int_cal_rf : cal_rf;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gen_d <= 1'b1; ext_d <= 1'b1; inj_d <= 1'b0; rf_d <= 1'b0; inj_pend <= 1'b0;
      cal_trig <= 1'b0; adc_trig <= 1'b0; ext_trig_out <= 1'b0; synch_trig <= 1'b0;
    end else begin
      gen_d <= cal_gen_n;
      ext_d <= ext_trig_n;
      inj_d <= inj_trig;
      rf_d  <= dds_rf;
      cal_trig     <= gen_d & ~cal_gen_n;
      ext_trig_out <= ext_d & ~ext_trig_n;
      adc_trig     <= bunch_det;
      synch_trig   <= resync_pulse | (inj_pend & dds_rf & ~rf_d);
      if (inj_trig & ~inj_d)      inj_pend <= 1'b1;
      else if (dds_rf & ~rf_d)    inj_pend <= 1'b0;
    end
  end
endmodule
