// Self-checking testbench for rf_shifter.
// Drives a random bit stream and, for every phase setting 0..31, checks that
// rf_out equals rf_in from (ph + 1) cycles earlier, taken from a tb history.
module tb_rf_shifter;
  logic clk = 0, rst_n = 0, rf_in = 0, rf_out;
  logic [4:0] ph = 0;
  logic hist[$];
  int checks = 0, failures = 0;

  rf_shifter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 32; p++) begin
      ph = 5'(p);
      hist = {};
      for (int c = 0; c < 100; c++) begin
        rf_in = 1'($urandom);
        hist.push_front(rf_in);
        @(negedge clk);
        // hist[0] is the value sampled at the edge just passed
        if (c > p + 2) begin
          checks++;
          if (rf_out !== hist[p]) begin
            failures++;
            if (failures < 10) $display("FAIL ph=%0d c=%0d", p, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
