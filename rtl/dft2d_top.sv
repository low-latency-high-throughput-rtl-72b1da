// dft2d_top: pipelined N x N two-dimensional DFT built from two systolic
// 1D-DFT blocks and a double-buffered transposition memory.
//
// The 2D transform is computed in two passes (equations 4 and 5): first the
// N-point DFT of every row, F'(m, l) = sum_n f(m, n) W^(l n), then the N-point
// DFT of every column of that intermediate matrix,
// F(k, l) = sum_m F'(m, l) W^(k m). Data path:
//   in_row (N 16-bit integers) -> N x int2fp -> dft1d (rows)
//     -> tbuf_ram bank A/B (row written per cycle, column read per cycle)
//     -> dft1d (columns) -> out_col
// tbuf_ctrl fills one bank with the N transformed rows of a matrix while the
// other bank feeds the columns of the previous matrix to the second block, so
// matrices can follow each other without a gap.
//
// Interface: one input row per cycle when in_valid is high; rows 0..N-1 of a
// matrix in order. The row results are also brought out (row_valid,
// row_dft[l] = F'(m, l)), so the design serves as a 1D-DFT engine as well.
// out_col[k] = F(k, l) for column l = out_col_idx when out_valid is high;
// columns come out in order l = 0..N-1, one per cycle.
// Timing: one N x N transform every N cycles when rows stream without gaps.
// Row m of a matrix leaves the first block LAT cycles after it entered (LAT =
// N for odd N, N-1 for even N, see dft1d); the first column enters the second
// block in the cycle after the last row is stored, so the first output column
// of a matrix appears N + 2*LAT cycles after its first row entered: 3N cycles
// for odd N (2N+1 after its last row), 3N-2 for even N. The architecture
// quotes 2N; a complete column cannot exist before all N rows are done, so
// this design does not reach that figure. Its rate of one matrix per N
// cycles matches the architecture.
module dft2d_top
  import dft_pkg::*;
#(
  parameter int N_LEN = 5,
  localparam int AW  = (N_LEN > 1) ? $clog2(N_LEN) : 1,
  localparam int LAT = (N_LEN % 2 == 0) ? N_LEN - 1 : N_LEN
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] in_row [N_LEN],
  output logic               row_valid,
  output cfp16_t             row_dft [N_LEN],
  output logic               out_valid,
  output logic [AW-1:0]      out_col_idx,
  output cfp16_t             out_col [N_LEN],
  output logic               buf_wr_bank,
  output logic               buf_rd_bank
);
  // ------------------------------------------- integer to floating point
  cfp16_t row_fp [N_LEN];
  for (genvar n = 0; n < N_LEN; n++) begin : g_cvt
    int2fp u_cvt (.din(in_row[n]), .dout(row_fp[n]));
  end

  // --------------------------------------------------------- row 1D-DFT
  dft1d #(.N_LEN(N_LEN)) u_rows (
    .clk, .rst_n, .in_valid, .in_data(row_fp),
    .out_valid(row_valid), .out_data(row_dft));

  // ------------------------------------------------ intermediate buffer
  logic          wr_en, wr_bank, rd_valid, rd_bank;
  logic [AW-1:0] wr_row, rd_col;
  cfp16_t        col_fp [N_LEN];

  tbuf_ctrl #(.N_LEN(N_LEN)) u_ctrl (
    .clk, .rst_n, .row_valid,
    .wr_en, .wr_bank, .wr_row,
    .rd_valid, .rd_bank, .rd_col, .rd_last(), .bank_full());

  tbuf_ram #(.N_LEN(N_LEN)) u_buf (
    .clk, .wr_en, .wr_bank, .wr_row, .wr_data(row_dft),
    .rd_bank, .rd_col, .rd_data(col_fp));

  assign buf_wr_bank = wr_bank;
  assign buf_rd_bank = rd_bank;

  // ------------------------------------------------------ column 1D-DFT
  dft1d #(.N_LEN(N_LEN)) u_cols (
    .clk, .rst_n, .in_valid(rd_valid), .in_data(col_fp),
    .out_valid, .out_data(out_col));

  pipe_delay #(.WIDTH(AW), .DEPTH(LAT)) u_col_idx (
    .clk, .rst_n, .d(rd_col), .q(out_col_idx));
endmodule
