// Self-checking testbench for pdfp_ctrl.
// Writes a distinct word to 64 addresses of each of the 8 banks (kept in a tb
// copy), then selects banks the way a cycle does: the injection bank at
// ELFT, then external triggers through the bank map. After each selection
// the active bank and the words read back (one cycle latency) are checked.
module tb_pdfp_ctrl;
  logic clk = 0, rst_n = 0, wr_en = 0, elft = 0;
  logic [2:0] wr_bank = 0, inj_bank = 0, bank;
  logic [9:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [3:0] ext_trig = 0;
  logic [3:0][2:0] bank_map = '{3'd6, 3'd1, 3'd7, 3'd4};  // trig3..trig0
  logic [31:0] copy [8][64];
  int checks = 0, failures = 0;

  pdfp_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic read_bank(input int b);
    check(bank == 3'(b), $sformatf("active bank %0d (got %0d)", b, bank));
    for (int a = 0; a < 64; a++) begin
      rd_addr = 10'(a * 16 + 3); @(negedge clk);
      check(rd_data == copy[b][a], $sformatf("bank %0d word %0d", b, a));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 8; b++)
      for (int a = 0; a < 64; a++) begin
        copy[b][a] = $urandom;
        wr_en = 1; wr_bank = 3'(b); wr_addr = 10'(a * 16 + 3); wr_data = copy[b][a];
        @(negedge clk);
      end
    wr_en = 0;
    // ELFT: injection bank 5
    inj_bank = 5; elft = 1; @(negedge clk); elft = 0;
    read_bank(5);
    // gymnastics triggers
    ext_trig = 4'b0001; @(negedge clk); ext_trig = 0; read_bank(4);
    ext_trig = 4'b0100; @(negedge clk); ext_trig = 0; read_bank(1);
    ext_trig = 4'b1010; @(negedge clk); ext_trig = 0; read_bank(7);   // lowest wins
    ext_trig = 4'b1000; @(negedge clk); ext_trig = 0; read_bank(6);
    inj_bank = 0; elft = 1; @(negedge clk); elft = 0; read_bank(0);
    inj_bank = 2; elft = 1; @(negedge clk); elft = 0; read_bank(2);
    inj_bank = 3; elft = 1; @(negedge clk); elft = 0; read_bank(3);
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
