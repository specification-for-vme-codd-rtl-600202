// Behavioural model of the Gate & BLR generator's x16 frequency loop.
// In hardware this is an analog PLL: a phase detector compares f_synchro with
// the /16 output of a 400-580 MHz VCO mixed down against 400 MHz and low-pass
// filtered, so the loop runs at 16 x f_synchro. That loop cannot be logic, so
// this model reproduces its function in the clk domain: it measures the
// f_synchro period in clk cycles and spreads 16 evenly spaced ticks over each
// following period, restarting the tick sequence on every f_synchro rising edge
// (the edge itself carries tick 0). The measuring method is this model's own.
// Interface: f_synchro is a sampled 1-bit level; tick16 is a one-cycle pulse,
// 16 per period once locked; locked goes high after the first full period.
// f_synchro periods must be at least 16 clk cycles. After a change of
// frequency the first period is subdivided with the previous measurement, so
// that period can lose or bunch a few ticks; the next ones are regular.
module vco_x16_pll #(
  parameter int CNT_W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic f_synchro,
  output logic tick16,
  output logic locked
);
  logic             f_d;
  logic [CNT_W-1:0] cnt;      // clk cycles since last rising edge
  logic [CNT_W-1:0] period;   // last measured period
  localparam int ACC_W = CNT_W + 4;
  logic [ACC_W-1:0] acc;      // 16 * cycles, compared with period
  logic [4:0]       nticks;   // ticks issued in this period
  logic             rise;

  assign rise = f_synchro & ~f_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_d <= 1'b0; cnt <= '0; period <= '0; locked <= 1'b0;
      acc <= '0; nticks <= '0; tick16 <= 1'b0;
    end else begin
      f_d    <= f_synchro;
      tick16 <= 1'b0;
      if (rise) begin
        if (cnt != '0) begin
          period <= cnt + 1'b1;
          locked <= 1'b1;
        end
        cnt    <= '0;
        acc    <= '0;
        nticks <= 5'd1;
        tick16 <= locked;
      end else begin
        cnt <= cnt + 1'b1;
        if (locked && nticks < 5'd16) begin
          // tick k falls where 16 * elapsed >= k * period
          if (acc + ACC_W'(16) >= (ACC_W'(period) * ACC_W'(nticks))) begin
            tick16 <= 1'b1;
            nticks <= nticks + 1'b1;
          end
          acc <= acc + ACC_W'(16);
        end
      end
    end
  end
endmodule
