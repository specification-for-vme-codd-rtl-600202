// Direct digital synthesiser of the f_b-RF PLL.
// An ACC_W-bit phase accumulator adds, every clk cycle, the frequency word
// programmed by the PDFP plus the loop correction derived from the phase
// error; its top bit is the output square wave f_b-RF (frequency
// ftw_eff / 2^ACC_W of clk). The specification gives the DDS, its PDFP
// frequency program and its correction by the digitised phase error; the loop
// filter is this design's: on each err_valid the proportional term becomes
// err * 2^KP_SH and the integral term gains err * 2^KI_SH. Between error
// words both terms are held.
// Timing: f_out and phase are registered; a new error word acts from the
// next cycle.
module dds #(
  parameter int ACC_W = 32,
  parameter int ERR_W = 12,
  parameter int KP_SH = 18,
  parameter int KI_SH = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ACC_W-1:0]        ftw,
  input  logic signed [ERR_W-1:0] err,
  input  logic                    err_valid,
  input  logic                    loop_en,
  output logic                    f_out,
  output logic [ACC_W-1:0]        phase,
  output logic [ACC_W-1:0]        ftw_eff
);
  logic signed [ACC_W-1:0] p_term, i_term, err_x;

  assign err_x   = ACC_W'(err);   // sign-extended
  assign ftw_eff = ftw + p_term + i_term;
  assign f_out   = phase[ACC_W-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0; p_term <= '0; i_term <= '0;
    end else begin
      phase <= phase + ftw_eff;
      if (!loop_en) begin
        p_term <= '0; i_term <= '0;
      end else if (err_valid) begin
        p_term <= err_x <<< KP_SH;
        i_term <= i_term + (err_x <<< KI_SH);
      end
    end
  end
endmodule
