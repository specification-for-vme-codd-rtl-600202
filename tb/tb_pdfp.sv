// Self-checking testbench for pdfp.
// Random B-train Up/Down pulses and C0 resets; the tb keeps its own B-count
// (saturating at 0 and 65535; the stimulus drives it to 0) and a table model f(a) = a * 3 + 0x1000 that
// answers one cycle after the address, like pdfp_ctrl. B-count, the clamped
// table address and the frequency word are checked every cycle.
module tb_pdfp;
  logic clk = 0, rst_n = 0, b_up = 0, b_down = 0, c0 = 0;
  logic [15:0] b_count;
  logic [9:0] tbl_addr;
  logic [31:0] tbl_data, ftw;
  int checks = 0, failures = 0;
  int model = 0, maxc = 0, at0 = 0;
  logic [31:0] f_hist[$];

  pdfp dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) tbl_data <= 32'(tbl_addr) * 3 + 32'h1000;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s model=%0d b=%0d", what, model, b_count); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int c = 0; c < 6000; c++) begin
      // mostly rising field, like a magnet cycle
      int r = $urandom_range(0, 99);
      // falling field at the start and after cycle 4000 drives the count to 0
      b_up = (c >= 300 && c <= 4000) ? (r < 60) : (r > 90);
      b_down = (c >= 300 && c <= 4000) ? (r >= 60 && r < 70) : (r < 60);
      c0 = (c == 2000);
      @(negedge clk);
      if (c0) model = 0;
      else if (b_up && !b_down) model = (model < 65535) ? model + 1 : model;
      else if (b_down && !b_up) model = (model > 0) ? model - 1 : 0;
      if (model > maxc) maxc = model;
      if (model == 0 && b_down) at0++;
      check(b_count == 16'(model), "B-count");
      // address follows the count one cycle later, ftw two cycles after that
      f_hist.push_front(32'(tbl_addr) * 3 + 32'h1000);
      if (f_hist.size() > 3) void'(f_hist.pop_back());
      if (c > 5) check(ftw == f_hist[2], "frequency word from table");
      check(tbl_addr <= 10'd1023, "address range");
    end
    $display("max B-count %0d, final %0d, cycles at 0 with Down: %0d", maxc, model, at0);
    check(maxc > 1023, "address clamp exercised");
    check(at0 > 0, "saturation at 0 exercised");
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
