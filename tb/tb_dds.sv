// Self-checking testbench for dds.
// Open loop: with ftw = 2^32 / 50 the output must make one period per 50
// cycles and the accumulator must advance by ftw every cycle. Closed loop:
// error words must change the effective frequency word by
// err * 2^18 (proportional, replaced) plus err * 2^14 (integral, summed), and
// disabling the loop must clear both.
module tb_dds;
  logic clk = 0, rst_n = 0, err_valid = 0, loop_en = 0;
  logic [31:0] ftw = 0, phase, ftw_eff;
  logic signed [11:0] err = 0;
  logic f_out;
  int checks = 0, failures = 0;

  dds dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic give_err(input int e);
    err = 12'(e); err_valid = 1; @(negedge clk); err_valid = 0; @(negedge clk);
  endtask

  initial begin
    longint ipart;
    int rises;
    logic fd;
    logic [31:0] ph0;
    repeat (3) @(negedge clk); rst_n = 1;
    ftw = 32'(64'h1_0000_0000 / 50);
    @(negedge clk);
    rises = 0; fd = f_out;
    for (int c = 0; c < 5000; c++) begin
      ph0 = phase;
      @(negedge clk);
      check(phase == ph0 + ftw, "accumulator step");
      if (f_out && !fd) rises++;
      fd = f_out;
    end
    $display("open loop: %0d periods in 5000 cycles", rises);
    check(rises >= 99 && rises <= 101, "output frequency ftw/2^32");
    loop_en = 1; ipart = 0;
    begin
      int errs[5] = '{5, -2, 100, -300, 0};
      foreach (errs[i]) begin
        give_err(errs[i]);
        ipart += longint'(errs[i]) * (1 << 14);
        check(ftw_eff == 32'(longint'(ftw) + longint'(errs[i]) * (1 << 18) + ipart),
              $sformatf("correction after err=%0d", errs[i]));
      end
    end
    loop_en = 0; @(negedge clk);
    check(ftw_eff == ftw, "loop disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
