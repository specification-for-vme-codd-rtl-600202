// Self-checking testbench for gate_blr_channel.
// A tb counter sweeps {bucket, phase} with one tick per clock over h = 8
// buckets; for several bunch-phase/mask/length settings the expected output
// is rebuilt from the list of cycles where the masked comparison holds: the
// output must be high exactly in the 'length' cycles that follow each match.
module tb_gate_blr_channel;
  import codd_pkg::*;
  logic clk = 0, rst_n = 0, tick16 = 0, enable = 0;
  logic [H_W-1:0] bucket = 0, mask = 0;
  logic [PH_W-1:0] phase = 0;
  logic [BP_W-1:0] bunch_phase = 0;
  logic [LEN_W-1:0] length = 0;
  logic out;
  int checks = 0, failures = 0;
  int last_match;   // cycle of last expected match, -1000 if none
  int cyc = 0;

  gate_blr_channel dut (.*);

  always #5 clk = ~clk;

  function automatic bit ref_match(logic [H_W-1:0] b, logic [PH_W-1:0] p,
                                   logic [BP_W-1:0] bp, logic [H_W-1:0] m);
    if (p != bp[PH_W-1:0]) return 0;
    for (int i = 0; i < H_W; i++)
      if (!m[i] && b[i] != bp[PH_W+i]) return 0;
    return 1;
  endfunction

  task automatic run_case(input logic [BP_W-1:0] bp, input logic [H_W-1:0] m,
                          input logic [LEN_W-1:0] len, input bit en, input int revs);
    int highs = 0, exp_highs = 0;
    @(negedge clk);
    bunch_phase = bp; mask = m; length = len; enable = en;
    bucket = 0; phase = 0; tick16 = 1; last_match = -1000;
    repeat (revs * 8 * 16) begin
      // evaluate at negedge: inputs stable, output from previous edges
      bit exp_out;
      exp_out = (cyc - last_match >= 1) && (cyc - last_match <= int'(length));
      checks++;
      if (out !== exp_out) begin
        failures++;
        if (failures < 10) $display("mismatch cyc=%0d b=%0d p=%0d out=%b exp=%b", cyc, bucket, phase, out, exp_out);
      end
      if (out) highs++;
      if (exp_out) exp_highs++;
      if (en && ref_match(bucket, phase, bp, m)) last_match = cyc;
      @(negedge clk);
      cyc++;
      {bucket, phase} = (bucket == 7 && phase == 15) ? '0 : {bucket, phase} + 1'b1;
    end
    enable = 0;              // keep ticking so the preset counter drains
    repeat (70) @(negedge clk);
    tick16 = 0;
    cyc += 70;
    last_match = -1000;
    $display("case bp=%h mask=%b len=%0d en=%0d: high cycles %0d (expected %0d)", bp, m, len, en, highs, exp_highs);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_case({5'd3, 4'd5}, 5'b00000, 6'd20, 1, 3);  // one bunch, longer than a bucket
    run_case({5'd0, 4'd0}, 5'b11111, 6'd4, 1, 2);   // every bucket (BLR style)
    run_case({5'd1, 4'd9}, 5'b00110, 6'd7, 1, 2);   // buckets 1,3,5,7
    run_case({5'd2, 4'd2}, 5'b00000, 6'd0, 1, 1);   // length 0: nothing
    run_case({5'd2, 4'd2}, 5'b00000, 6'd9, 0, 1);   // disabled
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
