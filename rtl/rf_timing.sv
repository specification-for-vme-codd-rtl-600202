// Timing / mux logic of the RF-Mux and Synchronizer.
// Following the specification, the PLL source is the calibration RF between
// C0 and C100, the PS-RF after C100 and the pick-up (PU) signal after
// injection. The TG8 timings /Cal-Start (C0) and /Cal-Stop (C100) are active
// low; Inj. Trig is active high; the software strobes soft_start, soft_stop
// and soft_inj do the same from control registers.
// calib: set by Cal-Start, cleared by Cal-Stop. sel_pu: cleared by Cal-Start,
// set by injection. The change of sel_pu is held until the next rising edge of
// the selected RF (rf_edge), so the PLL reference switches without a runt
// pulse; this retiming is this design's choice.
// Timing: falling edges of the active-low inputs are detected on clk; outputs
// are registered.
module rf_timing (
  input  logic clk,
  input  logic rst_n,
  input  logic cal_start_n,
  input  logic cal_stop_n,
  input  logic inj_trig,
  input  logic soft_start,
  input  logic soft_stop,
  input  logic soft_inj,
  input  logic rf_edge,
  output logic calib,
  output logic sel_pu
);
  logic start_d, stop_d, inj_d;
  logic start_p, stop_p, inj_p;
  logic pu_req;

  assign start_p = (start_d & ~cal_start_n) | soft_start;
  assign stop_p  = (stop_d  & ~cal_stop_n)  | soft_stop;
  assign inj_p   = (inj_trig & ~inj_d)      | soft_inj;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_d <= 1'b1; stop_d <= 1'b1; inj_d <= 1'b0;
      calib <= 1'b0; sel_pu <= 1'b0; pu_req <= 1'b0;
    end else begin
      start_d <= cal_start_n;
      stop_d  <= cal_stop_n;
      inj_d   <= inj_trig;
      if (start_p)     calib <= 1'b1;
      else if (stop_p) calib <= 1'b0;
      if (start_p)     pu_req <= 1'b0;
      else if (inj_p)  pu_req <= 1'b1;
      if (start_p)                 sel_pu <= 1'b0;
      else if (rf_edge)            sel_pu <= pu_req;
    end
  end
endmodule
