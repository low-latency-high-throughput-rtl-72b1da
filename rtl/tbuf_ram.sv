// tbuf_ram: the intermediate buffer between the two 1D-DFT blocks, 2*N*N
// complex cells of 32 bits (two banks of N x N) built from flip-flops.
//
// The row block writes one complete transformed row per cycle into one bank
// while the column block reads one complete column per cycle from the other
// bank, so the transposition between the two passes costs no extra pass over
// the data: write port and read port work in the same clock period, as in a
// dual-port RAM. Write: when wr_en is high, cell [wr_bank][wr_row][0..N-1]
// takes wr_data at the clock edge. Read: rd_data[m] = cell [rd_bank][m][rd_col]
// is combinational, so a column is available in the cycle it is addressed
// (the flip-flop implementation the architecture suggests has no fetch
// time). The controller never reads the bank being written.
module tbuf_ram
  import dft_pkg::*;
#(
  parameter int N_LEN = 5,
  localparam int AW = (N_LEN > 1) ? $clog2(N_LEN) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [AW-1:0] wr_row,
  input  cfp16_t        wr_data [N_LEN],
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_col,
  output cfp16_t        rd_data [N_LEN]
);
  cfp16_t mem [2][N_LEN][N_LEN];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int l = 0; l < N_LEN; l++) mem[wr_bank][wr_row][l] <= wr_data[l];
  end

  always_comb begin
    for (int m = 0; m < N_LEN; m++) rd_data[m] = mem[rd_bank][m][rd_col];
  end
endmodule
