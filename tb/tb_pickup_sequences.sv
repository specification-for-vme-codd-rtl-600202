// Workload testbench: acquisition-gate sequences over the 40 pick-ups.
// The pick-ups sit in straight sections 0, 3, 5, 7, 10, 13, ... 97, and one
// revolution spans 100 straight sections = 16 h ticks of the Gate & BLR
// generator. For each injection case the beam passes the pick-ups in a fixed
// order, starting from a given section and turning one way or the other:
//   Booster      43, 45, 47, ... 37, 40   (increasing sections)
//   EPA e+       93, 95, 97, ... 87, 90   (increasing sections)
//   EPA e-       73, 70, 67, ... 77, 75   (decreasing sections)
// A pick-up d sections downstream of the first one sees the bunch
// d/100 of a revolution later, so its gate setting is
// offset = bunch*16 + floor(16 h d / 100) ticks, written as
// {bucket, phase} of (offset mod 16 h), with Start = offset div 16 h and
// Stop = Start + 1 when the gate falls in a later turn. For h = 4, 7, 8, 10 and 16 and
// each sequence, the tb programs one generator per pick-up in turn, fires the
// Synch Trigger and checks that the gate starts at offset ticks (+ up to one
// tick) after it, with the programmed length, and that the start times follow
// the beam order.
module tb_pickup_sequences;
  import codd_pkg::*;
  localparam int PER = 64, TK = PER / 16;
  logic clk = 0, rst_n = 0, f_synchro = 0, synch_trig = 0, ext_trig = 0;
  logic [H_W-1:0] h = 8;
  logic [15:0] mask_en = 16'h0020;
  logic [TURN_W-1:0] start_turn = 0, stop_turn = 1, turn;
  logic [BP_W-1:0] blr_phase = 0, gate_phase = 0;
  logic [LEN_W-1:0] blr_len = 0, gate_len = 6;
  logic blr_out, gate_out, window, locked, armed;
  int checks = 0, failures = 0, cyc = 0, gates = 0;
  int pu_ss[40];

  gate_blr_generator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    f_synchro <= ((cyc + 1) % PER) < PER / 2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // one pick-up: program, trigger on an f_synchro edge, time the gate
  task automatic one_pu(input int hv, input int off, output int t_rise, output int width);
    logic gd;
    // a gate past the end of the revolution falls in a later turn
    start_turn = TURN_W'(off / (16 * hv));
    stop_turn  = start_turn + 1'b1;
    gate_phase = {H_W'((off % (16 * hv)) / 16), PH_W'(off % 16)};
    while (((cyc + 1) % PER) != 0) @(negedge clk);
    synch_trig = 1; @(negedge clk); synch_trig = 0;
    t_rise = -1; width = 0; gd = 0;
    for (int t = 0; t < 2 * 16 * hv * TK + 40 * TK; t++) begin
      if (gate_out && !gd && t_rise < 0) t_rise = t;
      if (gate_out) width++;
      gd = gate_out;
      @(negedge clk);
    end
  endtask

  task automatic sequence_run(input string name, input int hv, input int first_ss,
                              input bit reverse, input int bunch);
    int order[40], n = 0, d, off, tr, w, last = -1, ok_order = 1;
    // beam order: sort pick-ups by distance downstream of first_ss
    for (int sec = 0; sec < 100; sec++)
      for (int k = 0; k < 40; k++) begin
        d = reverse ? (first_ss - pu_ss[k] + 100) % 100 : (pu_ss[k] - first_ss + 100) % 100;
        if (d == sec) begin order[n] = k; n++; end
      end
    h = H_W'(hv);
    for (int i = 0; i < 40; i++) begin
      d = reverse ? (first_ss - pu_ss[order[i]] + 100) % 100 : (pu_ss[order[i]] - first_ss + 100) % 100;
      off = bunch * 16 + (16 * hv * d) / 100;
      one_pu(hv, off, tr, w);
      gates++;
      check(tr >= off * TK && tr <= off * TK + TK + 2,
            $sformatf("%s h=%0d PU SS%0d: gate at %0d, expected %0d", name, hv, pu_ss[order[i]], tr, off * TK));
      check(w == 6 * TK, $sformatf("%s h=%0d PU SS%0d: width %0d", name, hv, pu_ss[order[i]], w));
      if (tr < last) ok_order = 0;
      last = tr;
    end
    check(ok_order == 1, {name, ": gates follow the beam order"});
    $display("%-8s h=%2d bunch %0d: first PU SS%0d, last PU SS%0d, last gate %0d cycles after trigger",
             name, hv, bunch, pu_ss[order[0]], pu_ss[order[39]], last);
  endtask

  initial begin
    int hs[5] = '{4, 7, 8, 10, 16};
    for (int k = 0; k < 40; k++) pu_ss[k] = (k / 4) * 10 + ((k % 4 == 0) ? 0 : (k % 4 == 1) ? 3 : (k % 4 == 2) ? 5 : 7);
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (6 * PER) @(negedge clk);
    check(locked, "x16 loop locked");
    foreach (hs[i]) begin
      sequence_run("Booster", hs[i], 43, 0, 0);
      sequence_run("EPA e+", hs[i], 93, 0, hs[i] / 2);
      sequence_run("EPA e-", hs[i], 73, 1, hs[i] - 1);
    end
    $display("%0d gates placed", gates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
