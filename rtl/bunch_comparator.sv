// Bunch detector of the RF-Mux and Synchronizer (DAC + COMP in the block
// diagram). The hardware compares the analog pick-up signal with a threshold
// set by a 12-bit DAC, for the particle polarity PP. Here the pick-up signal
// arrives as a signed 12-bit sample and the comparison is digital:
//   pp = 0: det when pu_amp >  threshold
//   pp = 1: det when pu_amp < -threshold
// (the polarity coding is this design's choice). The threshold is read as an
// unsigned magnitude. det is registered: one clk cycle of latency.
module bunch_comparator #(
  parameter int DAC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DAC_W-1:0] pu_amp,
  input  logic [DAC_W-1:0] threshold,
  input  logic             pp,
  output logic             det
);
  logic signed [DAC_W:0] amp, thr;
  assign amp = (DAC_W+1)'(signed'(pu_amp));
  assign thr = signed'({1'b0, threshold});

  always_ff @(posedge clk) begin
    if (!rst_n) det <= 1'b0;
    else        det <= pp ? (amp < -thr) : (amp > thr);
  end
endmodule
