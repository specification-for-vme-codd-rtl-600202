// Re-synchroniser of the RF-Mux and Synchronizer.
// After RF gymnastics the Gate & BLR generators must be realigned to one of
// the remaining bunches. A request (/Resynch falling edge, or the software
// Soft Sync strobe) arms the block; the next bunch seen by the comparator
// (rising edge of det) starts a count of DDS-RF rising edges, and on the R-th
// edge (R = the 6-bit harmonic-dependent value, R = 0 meaning the first edge)
// a one-cycle sync_pulse is emitted, aligned with DDS-RF. The specification
// gives the block, its inputs and the 6-bit value; using that value as a
// count of DDS-RF periods is this design's reading.
// bunch_det is a one-cycle pulse on every rising edge of det, armed or not.
module resynchroniser #(
  parameter int R_W = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           resynch_n,
  input  logic           soft_sync,
  input  logic           det,
  input  logic           dds_rf,
  input  logic [R_W-1:0] r,
  output logic           sync_pulse,
  output logic           bunch_det,
  output logic           armed
);
  typedef enum logic [1:0] {IDLE, WAIT_BUNCH, COUNT} state_t;
  state_t         state;
  logic           res_d, det_d, rf_d;
  logic           req, det_rise, rf_rise;
  logic [R_W-1:0] cnt;

  assign req      = (res_d & ~resynch_n) | soft_sync;
  assign det_rise = det & ~det_d;
  assign rf_rise  = dds_rf & ~rf_d;
  assign armed    = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE; res_d <= 1'b1; det_d <= 1'b0; rf_d <= 1'b0;
      cnt <= '0; sync_pulse <= 1'b0; bunch_det <= 1'b0;
    end else begin
      res_d      <= resynch_n;
      det_d      <= det;
      rf_d       <= dds_rf;
      sync_pulse <= 1'b0;
      bunch_det  <= det_rise;
      unique case (state)
        IDLE:       if (req) state <= WAIT_BUNCH;
        WAIT_BUNCH: if (det_rise) begin state <= COUNT; cnt <= '0; end
        COUNT:      if (rf_rise) begin
                      if (cnt == r) begin
                        sync_pulse <= 1'b1;
                        state      <= IDLE;
                      end else begin
                        cnt <= cnt + 1'b1;
                      end
                    end
        default:    state <= IDLE;
      endcase
    end
  end
endmodule
