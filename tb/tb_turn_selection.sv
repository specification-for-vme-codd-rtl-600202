// Self-checking testbench for turn_selection.
// Revolution pulses every 10 cycles; after a trigger the tb keeps its own
// turn count and expects the window exactly for Start <= turn < Stop.
// Checks the specification's two-turn window (Stop = Start + 2), a wider
// window, re-triggering, and saturation at 65535 turns.
module tb_turn_selection;
  import codd_pkg::*;
  logic clk = 0, rst_n = 0, trig = 0, rev_start = 0;
  logic [TURN_W-1:0] start_turn = 0, stop_turn = 0, turn;
  logic armed, window;
  int checks = 0, failures = 0;
  int exp_turn, win_turns;

  turn_selection dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s turn=%0d exp=%0d", what, turn, exp_turn); end
  endtask

  task automatic run(input int st, input int sp, input int nrev);
    int opened = 0;
    @(negedge clk); start_turn = TURN_W'(st); stop_turn = TURN_W'(sp);
    trig = 1; @(negedge clk); trig = 0; exp_turn = 0;
    for (int r = 0; r < nrev; r++) begin
      for (int c = 0; c < 10; c++) begin
        rev_start = (c == 9);
        @(negedge clk);
        if (rev_start && exp_turn < 65535) exp_turn++;
        check(turn == TURN_W'(exp_turn), "turn");
        // window follows turn by one cycle: check at mid-revolution
        if (c == 5) begin
          check(window == (exp_turn >= st && exp_turn < sp), "window");
          if (window) opened++;
        end
      end
    end
    rev_start = 0;
    $display("start=%0d stop=%0d: window open in %0d turns", st, sp, opened);
    win_turns = opened;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(!window && !armed, "idle after reset");
    run(3, 5, 10);   check(win_turns == 2, "two turns");
    run(0, 4, 8);    check(win_turns == 4, "four turns");
    run(7, 9, 12);   check(win_turns == 2, "retrigger");
    // saturation: force long run quickly with one-cycle revolutions
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    start_turn = 16'hFFFF; stop_turn = 16'hFFFF;
    rev_start = 1; repeat (70000) @(negedge clk); rev_start = 0;
    @(negedge clk);
    check(turn == 16'hFFFF, "saturates at 65535");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
