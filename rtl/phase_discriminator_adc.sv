// Phase discriminator and ADC of the f_b-RF PLL.
// In the original loop an analog discriminator compares f_b-RF with the
// reference (PS-RF or PU signal) and an ADC turns the error into digital
// words for the DDS. Here the same function is digital: a phase-frequency
// detector that times, in clk cycles, the gap between a reference rising edge
// and the following feedback rising edge (or the reverse). When the second of
// the pair arrives, err holds the signed gap - positive when the reference
// leads (f_b-RF late), negative when f_b-RF leads - and err_valid pulses for
// one cycle. Coincident edges give 0. The gap saturates at the largest
// ERR_W-bit value. The digital method is this design's choice.
module phase_discriminator_adc #(
  parameter int ERR_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_in,
  input  logic                    fb,
  output logic signed [ERR_W-1:0] err,
  output logic                    err_valid
);
  typedef enum logic [1:0] {IDLE, REF_FIRST, FB_FIRST} pfd_t;
  localparam logic [ERR_W-2:0] MAXC = '1;
  pfd_t             st;
  logic             ref_d, fb_d, ref_rise, fb_rise;
  logic [ERR_W-2:0] cnt;

  assign ref_rise = ref_in & ~ref_d;
  assign fb_rise  = fb & ~fb_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; ref_d <= 1'b0; fb_d <= 1'b0; cnt <= '0;
      err <= '0; err_valid <= 1'b0;
    end else begin
      ref_d     <= ref_in;
      fb_d      <= fb;
      err_valid <= 1'b0;
      unique case (st)
        IDLE: begin
          cnt <= 1;
          if (ref_rise && fb_rise) begin
            err <= '0; err_valid <= 1'b1;
          end else if (ref_rise) st <= REF_FIRST;
          else if (fb_rise)      st <= FB_FIRST;
        end
        REF_FIRST: if (fb_rise) begin
            err <= signed'({1'b0, cnt}); err_valid <= 1'b1; st <= IDLE;
          end else if (cnt != MAXC) cnt <= cnt + 1'b1;
        FB_FIRST: if (ref_rise) begin
            err <= -signed'({1'b0, cnt}); err_valid <= 1'b1; st <= IDLE;
          end else if (cnt != MAXC) cnt <= cnt + 1'b1;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
