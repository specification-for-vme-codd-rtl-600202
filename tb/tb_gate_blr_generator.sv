// Self-checking testbench for gate_blr_generator.
// f_synchro has a period of 64 clk cycles, so the x16 loop ticks every 4
// cycles and one revolution at h = 8 lasts 16 * 8 * 4 = 512 cycles. After a
// Synch Trigger (or External trigger) the tb measures the rising edges and
// high time of each output and compares them with values worked out from the
// register settings: a gate of 'len' ticks for each selected turn, placed at
// (turn*16*h + bucket*16 + phase) ticks after the trigger; BLR pulses in every
// bucket (mask all ones), or only in the turn window when bit 7 is set.
module tb_gate_blr_generator;
  import codd_pkg::*;
  localparam int PER = 64, TK = PER / 16;
  logic clk = 0, rst_n = 0, f_synchro = 0, synch_trig = 0, ext_trig = 0;
  logic [H_W-1:0] h = 8;
  logic [15:0] mask_en = 0;
  logic [TURN_W-1:0] start_turn = 0, stop_turn = 0, turn;
  logic [BP_W-1:0] blr_phase = 0, gate_phase = 0;
  logic [LEN_W-1:0] blr_len = 0, gate_len = 0;
  logic blr_out, gate_out, window, locked, armed;
  int checks = 0, failures = 0;
  int cyc = 0;

  gate_blr_generator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    f_synchro <= ((cyc + 1) % PER) < PER / 2;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // wait for the cycle where f_synchro rises, pulse the chosen trigger there
  task automatic trigger(input bit ext);
    while (((cyc + 1) % PER) != 0) @(negedge clk);
    if (ext) ext_trig = 1; else synch_trig = 1;
    @(negedge clk); synch_trig = 0; ext_trig = 0;
  endtask

  // observe for n cycles after trigger; record rising edges and high cycles
  task automatic observe(input int n, output int g_rise[$], output int g_high,
                         output int b_rise[$], output int b_high);
    logic g_d = 0, b_d = 0;
    g_rise = {}; b_rise = {}; g_high = 0; b_high = 0;
    for (int t = 0; t < n; t++) begin
      if (gate_out && !g_d) g_rise.push_back(t);
      if (blr_out && !b_d) b_rise.push_back(t);
      if (gate_out) g_high++;
      if (blr_out) b_high++;
      g_d = gate_out; b_d = blr_out;
      @(negedge clk);
    end
  endtask

  int gr[$], br[$], gh, bh, exp0;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (6 * PER) @(negedge clk);
    check(locked, "x16 loop locked");

    // Gate module: bucket 3, phase 5, 20 ticks, turns 2 and 3
    h = 8; mask_en = 16'h0020; gate_phase = {5'd3, 4'd5}; gate_len = 20;
    blr_len = 0; start_turn = 2; stop_turn = 4;
    trigger(0);
    observe(6 * 512, gr, gh, br, bh);
    exp0 = (2 * 16 * 8 + 3 * 16 + 5) * TK;
    $display("gate: %0d pulses, %0d high cycles, first at %0d (expected about %0d)", gr.size(), gh, gr.size() ? gr[0] : -1, exp0);
    check(gr.size() == 2, "two gates (Stop = Start + 2)");
    check(gh == 2 * 20 * TK, "gate length 20 ticks");
    if (gr.size() == 2) begin
      check(gr[0] >= exp0 && gr[0] <= exp0 + TK + 2, "gate position");
      check(gr[1] - gr[0] == 16 * 8 * TK, "one revolution between gates");
    end
    check(br.size() == 0, "BLR silent with length 0");

    // BLR module: every bucket at phase 2, 4 ticks, free running
    mask_en = 16'h003F; blr_phase = {5'd0, 4'd2}; blr_len = 4; gate_len = 0;
    trigger(0);
    observe(3 * 512, gr, gh, br, bh);
    $display("blr: %0d pulses in 3 revolutions", br.size());
    check(br.size() == 24, "BLR on every bucket");
    check(bh == 24 * 4 * TK, "BLR length");
    check(gr.size() == 0, "gate silent");
    if (br.size() > 2) check(br[1] - br[0] == 16 * TK, "one bucket between BLR pulses");

    // BLR restricted to the turn window (bit 7), h = 4, turns 1..2
    h = 4; mask_en = 16'h00BF; start_turn = 1; stop_turn = 3;
    trigger(0);
    observe(5 * 256, gr, gh, br, bh);
    $display("blr in window: %0d pulses", br.size());
    check(br.size() == 8, "BLR only in two turns at h=4");

    // disabled outputs
    mask_en = 16'h001F; gate_len = 10;
    trigger(0);
    observe(3 * 256, gr, gh, br, bh);
    check(gr.size() == 0 && br.size() == 0, "outputs disabled");

    // turn counter started by the External trigger
    h = 8; mask_en = 16'h0060; gate_phase = {5'd1, 4'd0}; gate_len = 8;
    blr_len = 0; start_turn = 1; stop_turn = 3;
    trigger(0);
    repeat (3 * 512 + 7 * TK * 16) @(negedge clk);
    trigger(1);
    observe(5 * 512, gr, gh, br, bh);
    $display("ext trig: %0d gates, high %0d", gr.size(), gh);
    check(gr.size() == 2 && gh == 2 * 8 * TK, "two gates after External trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
