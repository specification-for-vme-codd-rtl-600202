// PDFP, the programmable digital frequency program of the f_b-RF PLL.
// It follows the magnetic field through the B-train: every Up pulse adds one
// to the B-count and every Down pulse subtracts one; c0 clears the count, so
// that B-count starts at C0 as the specification requires. The count, shifted
// right by B_SHIFT and clamped to the table size, addresses the frequency
// table of the active bank (held in pdfp_ctrl), and the word read is the DDS
// frequency word. Count width, table size, clamping and saturation at 0 and at
// the top are this design's choices.
// Timing: tbl_addr is registered; tbl_data is expected one cycle later and is
// registered into ftw, so ftw follows a B pulse after three cycles.
module pdfp #(
  parameter int B_W     = 16,
  parameter int ADDR_W  = 10,
  parameter int B_SHIFT = 0,
  parameter int DATA_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              b_up,
  input  logic              b_down,
  input  logic              c0,
  output logic [B_W-1:0]    b_count,
  output logic [ADDR_W-1:0] tbl_addr,
  input  logic [DATA_W-1:0] tbl_data,
  output logic [DATA_W-1:0] ftw
);
  logic [B_W-1:0] b_sh;
  assign b_sh = b_count >> B_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n || c0) begin
      b_count <= '0;
    end else if (b_up && !b_down) begin
      if (b_count != '1) b_count <= b_count + 1'b1;
    end else if (b_down && !b_up) begin
      if (b_count != '0) b_count <= b_count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tbl_addr <= '0; ftw <= '0;
    end else begin
      tbl_addr <= (b_sh > B_W'({ADDR_W{1'b1}})) ? '1 : ADDR_W'(b_sh);
      ftw      <= tbl_data;
    end
  end
endmodule
