// VME PDFP controller: the frequency-program memory of the PDFP.
// Following the specification, the frequency tables f(B) are held in
// N_BANKS = 8 banks, one per particle type and harmonic, written by the crate
// CPU. The injection bank is selected at ELFT (for the next cycle), and RF
// gymnastics switch bank on external triggers through a bank map set before
// C0. Here each of the N_TRIG external triggers k selects bank bank_map[k]
// (lowest k wins if several arrive together); ELFT selects inj_bank. The
// number of triggers, table size and word width are this design's choices,
// and the serial link to the NIM PDFP is replaced by a parallel read port.
// Timing: writes take effect at the clock edge; rd_data is registered (one
// cycle after rd_addr) and reads the bank active at that edge.
module pdfp_ctrl #(
  parameter int N_BANKS = 8,
  parameter int ADDR_W  = 10,
  parameter int DATA_W  = 32,
  parameter int N_TRIG  = 4,
  localparam int BK_W   = $clog2(N_BANKS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [BK_W-1:0]             wr_bank,
  input  logic [ADDR_W-1:0]           wr_addr,
  input  logic [DATA_W-1:0]           wr_data,
  input  logic                        elft,
  input  logic [BK_W-1:0]             inj_bank,
  input  logic [N_TRIG-1:0]           ext_trig,
  input  logic [N_TRIG-1:0][BK_W-1:0] bank_map,
  input  logic [ADDR_W-1:0]           rd_addr,
  output logic [DATA_W-1:0]           rd_data,
  output logic [BK_W-1:0]             bank
);
  logic [DATA_W-1:0] mem [N_BANKS << ADDR_W];
  logic [BK_W-1:0]   next_bank;

  always_comb begin
    next_bank = bank;
    if (elft) next_bank = inj_bank;
    for (int k = N_TRIG - 1; k >= 0; k--)
      if (ext_trig[k]) next_bank = bank_map[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) bank <= '0;
    else        bank <= next_bank;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data;
    rd_data <= mem[{bank, rd_addr}];
  end
endmodule
