// One comparator and preset-counter path of the Gate & BLR generator.
// The 9-bit comparator matches {bucket, phase} against the bunch-phase
// register (5-bit bucket selection, 4-bit phase selection); the 5-bit mask
// makes bucket bits don't-care, so one register can fire in several buckets of
// a revolution. A match loads the 6-bit preset counter with the length; the
// output stays high while the counter, clocked by the 16 x f_synchro tick,
// is non-zero, so a pulse is 'length' ticks long and may span more than a
// bucket. All of that follows the specification. Mask polarity (1 = ignore),
// the reload on a new match, and length 0 meaning no pulse are this design's.
// Timing: the comparison is made on a tick; out rises one clk cycle after the
// matching tick and falls one cycle after the length-th tick.
module gate_blr_channel
  import codd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick16,
  input  logic [H_W-1:0]   bucket,
  input  logic [PH_W-1:0]  phase,
  input  logic [BP_W-1:0]  bunch_phase,
  input  logic [H_W-1:0]   mask,
  input  logic [LEN_W-1:0] length,
  input  logic             enable,   // gating of the match (enable and window)
  output logic             out
);
  logic [BP_W-1:0]  cmp_mask;
  logic             match;
  logic [LEN_W-1:0] cnt;

  assign cmp_mask = {~mask, {PH_W{1'b1}}};
  assign match    = tick16 && enable &&
                    ((({bucket, phase} ^ bunch_phase) & cmp_mask) == '0);

  always_ff @(posedge clk) begin
    if (!rst_n)                         cnt <= '0;
    else if (match)                     cnt <= length;
    else if (tick16 && cnt != '0)       cnt <= cnt - 1'b1;
  end

  assign out = (cnt != '0);
endmodule
