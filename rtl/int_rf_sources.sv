// Internal RF sources of the RF-Mux and Synchronizer (INT CLK and INT CAL-RF),
// used to exercise the module without external RF inputs. The specification
// names both blocks; their frequencies are this design's choice: int_clk is a
// square wave of period INT_DIV clk cycles, int_cal_rf a square wave of period
// CAL_DIV int_clk periods, derived from int_clk. Both must be even.
// Outputs are registered and start low after reset.
module int_rf_sources #(
  parameter int INT_DIV = 64,
  parameter int CAL_DIV = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic int_clk,
  output logic int_cal_rf
);
  localparam int IW = $clog2(INT_DIV);
  localparam int CW = $clog2(CAL_DIV) + 1;
  logic [IW-1:0] icnt;
  logic [CW-1:0] ccnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      icnt <= '0; ccnt <= '0; int_clk <= 1'b0; int_cal_rf <= 1'b0;
    end else if (icnt == IW'(INT_DIV/2 - 1)) begin
      icnt    <= '0;
      int_clk <= ~int_clk;
      // count int_clk half periods
      if (ccnt == CW'(CAL_DIV - 1)) begin
        ccnt       <= '0;
        int_cal_rf <= ~int_cal_rf;
      end else begin
        ccnt <= ccnt + 1'b1;
      end
    end else begin
      icnt <= icnt + 1'b1;
    end
  end
endmodule
