// PS-RF phase shifter of the RF-Mux and Synchronizer.
// The specification gives a 5-bit phase setting used to bring the PS-RF in
// phase with the pick-up signal so that the PLL can move from one to the other
// smoothly. This implementation is a 32-stage delay line on clk: rf_out is
// rf_in delayed by (ph + 1) clk cycles (one register stage is always present).
// The delay-line method is this design's choice; with a clk of 32 samples per
// RF period, one step is 1/32 of the RF period.
module rf_shifter #(
  parameter int PH_W = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rf_in,
  input  logic [PH_W-1:0] ph,
  output logic            rf_out
);
  localparam int DEPTH = 1 << PH_W;
  logic [DEPTH-1:0] line;

  always_ff @(posedge clk) begin
    if (!rst_n) line <= '0;
    else        line <= {line[DEPTH-2:0], rf_in};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rf_out <= 1'b0;
    else        rf_out <= (ph == '0) ? rf_in : line[ph - 1'b1];
  end
endmodule
