// Self-checking testbench for bucket_timebase.
// Random tick16 pulses; the expected phase and bucket are derived from the
// number of ticks n since the last sync: phase = n mod 16,
// bucket = (n div 16) mod h, and a revolution start is expected each time n
// reaches a multiple of 16 h. Several harmonic numbers are tried, including
// h = 0 (32 buckets).
module tb_bucket_timebase;
  import codd_pkg::*;
  logic clk = 0, rst_n = 0, tick16 = 0, sync = 0;
  logic [H_W-1:0] h = 8;
  logic [PH_W-1:0] phase;
  logic [H_W-1:0] bucket;
  logic rev_start;
  int checks = 0, failures = 0;
  int n, nb, revs, exp_revs;

  bucket_timebase dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s n=%0d ph=%0d b=%0d", what, n, phase, bucket); end
  endtask

  task automatic run_h(input int hv, input int nticks);
    @(negedge clk); h = H_W'(hv); sync = 1; @(negedge clk); sync = 0;
    nb = (hv == 0) ? 32 : hv;
    n = 0; revs = 0; exp_revs = 0;
    check(!rev_start, "no rev_start on sync");
    while (n < nticks) begin
      tick16 = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (tick16) begin
        n++;
        if (n % (16 * nb) == 0) exp_revs++;
      end
      if (rev_start) revs++;
      check(phase == PH_W'(n % 16), "phase");
      check(bucket == H_W'((n / 16) % nb), "bucket");
    end
    tick16 = 0;
    check(revs == exp_revs, "revolution count");
    $display("h=%0d ticks=%0d revolutions=%0d (expected %0d)", hv, n, revs, exp_revs);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_h(8, 16 * 8 * 3 + 5);
    run_h(7, 16 * 7 * 2 + 40);
    run_h(4, 16 * 4 * 4);
    run_h(16, 16 * 16 * 2 + 1);
    run_h(0, 16 * 32 * 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
