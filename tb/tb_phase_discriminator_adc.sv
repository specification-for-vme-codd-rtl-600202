// Self-checking testbench for phase_discriminator_adc.
// Reference and feedback square waves of 50 cycles, the feedback delayed by
// d cycles (negative: feedback leads). After the first period each error
// word must equal d, and one word must come per period. The detector is reset
// before each case, since a detector pairs edges by order of arrival.
module tb_phase_discriminator_adc;
  logic clk = 0, rst_n = 0, ref_in = 0, fb = 0;
  logic signed [11:0] err;
  logic err_valid;
  int checks = 0, failures = 0;

  phase_discriminator_adc dut (.*);
  always #5 clk = ~clk;

  task automatic run(input int d);
    int words = 0;
    // restart the detector so each case starts with a fresh edge pairing
    rst_n = 0; ref_in = 0; fb = 0; @(negedge clk); rst_n = 1;
    for (int c = 0; c < 50 * 12; c++) begin
      ref_in = ((c + 100) % 50) < 25;
      fb     = ((c + 100 - d) % 50) < 25;
      @(negedge clk);
      if (err_valid && c > 60) begin
        words++; checks++;
        if (err != 12'(d)) begin failures++; $display("FAIL d=%0d err=%0d", d, err); end
      end
    end
    checks++;
    if (words < 9 || words > 11) begin failures++; $display("FAIL d=%0d words=%0d", d, words); end
    $display("d=%0d: %0d error words, last %0d", d, words, err);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(0); run(7); run(-4); run(20); run(-15); run(1);
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
