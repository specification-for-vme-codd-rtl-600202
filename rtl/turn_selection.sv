// Turn selection of the Gate & BLR generator.
// A trigger (the Synchronisation Trigger or the External trigger, chosen
// outside) clears the 16-bit turn counter and arms it; each following
// revolution start adds one, saturating at 65535 (the specification's 64 K
// turns). The acquisition window is open while Start <= turn < Stop, so with
// the specification's Stop = Start + 2 exactly two turns are acquired. Turn 0
// is the revolution that begins at the trigger (this design's numbering).
// Timing: window is registered and follows the counter by one cycle.
module turn_selection
  import codd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig,
  input  logic              rev_start,
  input  logic [TURN_W-1:0] start_turn,
  input  logic [TURN_W-1:0] stop_turn,
  output logic [TURN_W-1:0] turn,
  output logic              armed,
  output logic              window
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      turn <= '0; armed <= 1'b0;
    end else if (trig) begin
      turn <= '0; armed <= 1'b1;
    end else if (armed && rev_start && turn != '1) begin
      turn <= turn + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) window <= 1'b0;
    else        window <= armed && !trig && turn >= start_turn && turn < stop_turn;
  end
endmodule
