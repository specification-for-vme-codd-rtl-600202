// Bucket timebase of the Gate & BLR generator: the "/16" and "/h" counters.
// Every tick16 (one 16 x f_synchro period) advances the 4-bit phase within a
// bucket; when the phase wraps, the bucket counter advances, and it wraps after
// h buckets, so one full count is one revolution (T_rev = 16 x h x T_vco).
// The specification gives the two dividers, the 5-bit harmonic number and the
// Synch Trigger input to the /h counter; that the trigger resets both counters
// to bucket 0, phase 0, and that h = 0 counts 32 buckets, are this design's
// choices.
// Timing: outputs are registered; rev_start is a one-cycle pulse on the cycle
// the counters wrap from the last bucket to bucket 0 (not on sync, so the
// revolution that a trigger starts is turn 0 for the turn counter).
module bucket_timebase
  import codd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick16,
  input  logic            sync,
  input  logic [H_W-1:0]  h,
  output logic [PH_W-1:0] phase,
  output logic [H_W-1:0]  bucket,
  output logic            rev_start
);
  logic [H_W-1:0] last_bucket;
  assign last_bucket = h - 1'b1;   // h = 0 wraps to 31: 32 buckets

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0; bucket <= '0; rev_start <= 1'b0;
    end else begin
      rev_start <= 1'b0;
      if (sync) begin
        phase <= '0; bucket <= '0;
      end else if (tick16) begin
        phase <= phase + 1'b1;
        if (phase == '1) begin
          if (bucket >= last_bucket) begin
            bucket    <= '0;
            rev_start <= 1'b1;
          end else begin
            bucket <= bucket + 1'b1;
          end
        end
      end
    end
  end
endmodule
