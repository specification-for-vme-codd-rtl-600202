// Shared constants of the CODD synchronisation RTL.
// The register widths below are the ones the specification prints: 5-bit
// harmonic number, 9-bit bunch phase (5-bit bucket, 4-bit phase), 6-bit output
// length, 16-bit turn registers, 5-bit RF phase shift, 12-bit comparator
// threshold, 6-bit resynchronisation value, 8 frequency-table banks and 10
// Gate & BLR generators. The Enable/Mask bit positions are this design's own.
package codd_pkg;
  localparam int H_W      = 5;   // harmonic number / bucket counter
  localparam int PH_W     = 4;   // phase within bucket (1/16 of f_synchro)
  localparam int BP_W     = H_W + PH_W;  // bunch-phase register
  localparam int LEN_W    = 6;   // Gate / BLR length
  localparam int TURN_W   = 16;  // Start / Stop / turn counter
  localparam int SHIFT_W  = 5;   // RF phase shifter setting
  localparam int DAC_W    = 12;  // comparator threshold
  localparam int R_W      = 6;   // resynchronisation value
  localparam int N_BANKS  = 8;   // PDFP frequency-table banks
  localparam int N_GEN    = 10;  // Gate & BLR generators in the crate

  // Enable/Mask register bit assignment (this design's choice).
  localparam int EM_MASK_LSB  = 0;  // [4:0] bucket mask, 1 = don't care
  localparam int EM_ENABLE    = 5;  // output enable
  localparam int EM_EXT_TRIG  = 6;  // turn counter started by External trigger
  localparam int EM_BLR_TURNS = 7;  // BLR restricted to the turn window

  // Per-generator register set.
  typedef struct packed {
    logic [H_W-1:0]    h;
    logic [15:0]       mask_en;
    logic [TURN_W-1:0] start_turn;
    logic [TURN_W-1:0] stop_turn;
    logic [BP_W-1:0]   blr_phase;
    logic [BP_W-1:0]   gate_phase;
    logic [LEN_W-1:0]  blr_len;
    logic [LEN_W-1:0]  gate_len;
  } gen_regs_t;
endpackage
