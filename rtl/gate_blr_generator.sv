// VME Gate & BLR Generator: produces the acquisition Gate and the Base Line
// Restoration (BLR) pulse trains for the CODD integrators, phase-locked to
// f_synchro with a resolution of 1/16 of its period.
// Structure (as in the specification): an x16 loop locked to f_synchro
// (vco_x16_pll, a behavioural stand-in for the analog VCO), the /16 and /h
// bucket timebase realigned by the Synch Trigger, a turn selection started by
// the Synch Trigger or the External trigger, and two comparator/preset-counter
// channels, one for BLR and one for the Gate, each with its own 9-bit bunch
// phase and 6-bit length and sharing the 5-bit bucket mask.
// This design's choices: the Enable/Mask bit layout of codd_pkg ([4:0] mask,
// [5] enable, [6] external trigger selects the turn counter start, [7] BLR
// restricted to the turn window); the Gate always follows the turn window,
// the BLR fires every turn unless bit 7 is set.
// Timing: everything runs on clk; f_synchro, synch_trig and ext_trig are
// sampled levels/pulses in that domain; outputs are registered.
module gate_blr_generator
  import codd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              f_synchro,
  input  logic              synch_trig,
  input  logic              ext_trig,
  input  logic [H_W-1:0]    h,
  input  logic [15:0]       mask_en,
  input  logic [TURN_W-1:0] start_turn,
  input  logic [TURN_W-1:0] stop_turn,
  input  logic [BP_W-1:0]   blr_phase,
  input  logic [BP_W-1:0]   gate_phase,
  input  logic [LEN_W-1:0]  blr_len,
  input  logic [LEN_W-1:0]  gate_len,
  output logic              blr_out,
  output logic              gate_out,
  output logic              window,
  output logic [TURN_W-1:0] turn,
  output logic              armed,
  output logic              locked
);
  logic            tick16, rev_start, trig_sel;
  logic [PH_W-1:0] phase;
  logic [H_W-1:0]  bucket, mask;
  logic            en, blr_en, gate_en;

  assign mask     = mask_en[EM_MASK_LSB +: H_W];
  assign en       = mask_en[EM_ENABLE];
  assign trig_sel = mask_en[EM_EXT_TRIG] ? ext_trig : synch_trig;

  vco_x16_pll u_vco (
    .clk, .rst_n, .f_synchro, .tick16, .locked
  );

  bucket_timebase u_tb (
    .clk, .rst_n, .tick16, .sync(synch_trig), .h, .phase, .bucket, .rev_start
  );

  turn_selection u_turns (
    .clk, .rst_n, .trig(trig_sel), .rev_start, .start_turn, .stop_turn,
    .turn, .armed, .window
  );

  assign blr_en  = en && (!mask_en[EM_BLR_TURNS] || window);
  assign gate_en = en && window;

  gate_blr_channel u_blr (
    .clk, .rst_n, .tick16, .bucket, .phase, .bunch_phase(blr_phase), .mask,
    .length(blr_len), .enable(blr_en), .out(blr_out)
  );

  gate_blr_channel u_gate (
    .clk, .rst_n, .tick16, .bucket, .phase, .bunch_phase(gate_phase), .mask,
    .length(gate_len), .enable(gate_en), .out(gate_out)
  );
endmodule
