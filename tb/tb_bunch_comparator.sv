// Self-checking testbench for bunch_comparator.
// Random signed 12-bit samples, thresholds and polarities; the expected
// detection is computed with integers in the tb and compared one cycle later.
module tb_bunch_comparator;
  logic clk = 0, rst_n = 0, pp = 0, det;
  logic [11:0] pu_amp = 0, threshold = 0;
  int checks = 0, failures = 0, hits = 0;
  bit exp_det;

  bunch_comparator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3000) begin
      int a, t;
      pu_amp = 12'($urandom); threshold = 12'($urandom_range(0, 2047)); pp = 1'($urandom);
      a = int'($signed(pu_amp)); t = int'(threshold);
      exp_det = pp ? (a < -t) : (a > t);
      @(negedge clk);
      checks++;
      if (det !== exp_det) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d t=%0d pp=%0d det=%0d", a, t, pp, det);
      end
      if (det) hits++;
    end
    $display("detections %0d of 3000", hits);
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
