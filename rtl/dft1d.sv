// dft1d: systolic, fully pipelined N-point 1D-DFT block.
//
// The transform is split (equations 6-8 and 13-20) into a DC term and, for
// each k = 1..M with M = (N-1)/2, the pair F(k), F(N-k) built from four real
// inner products of length M over x(n) = f(n) + f(N-n) and
// y(n) = f(n) - f(N-n). The array is laid out as in the architecture:
//   - first row: M sb1 blocks forming x(n), y(n) and the running sum of x,
//     ending in one sb2 that forms F(0) and starts f(0) down the last column;
//   - below them an M x M grid of processing cells pc(k, n), x and y flowing
//     down the columns, the partial sums F1..F4 flowing right along the rows;
//   - last column: M sb3 blocks forming F(k) and F(N-k).
// Every block registers its outputs. The input pair of column n is skewed by
// n-1 registers (f(0) by M) so that operands meet partial sums in step; sb2
// delivers after M+1 cycles and sb3 of row k after M+1+k cycles, as the
// document states. Output alignment registers (M - k of them behind sb3 of row
// k, M behind sb2) then present all N outputs of one input vector together.
//
// Even N (equations 9-12, M = N/2 - 1): the unpaired input f(N/2) is skewed
// like f(0), each sb1 also keeps the alternating sum of x(n), and sb_even
// replaces sb2: it forms F(0), F(N/2) and f(0) +- f(N/2), and the sb3 of row k
// is fed f(0) + (-1)^k f(N/2) in place of f(0). The document designs the
// hardware for odd N and leaves this modification to the reader; it is this
// design's own construction.
//
// Interface: one complex input vector f(0..N-1) per cycle when in_valid is
// high (a new vector may enter every cycle, so ACT = N cycles for N vectors);
// out_data[k] = F(k), k = 0..N-1, out_valid marks them. Latency LAT = 2M+1
// cycles: a vector sampled at clock edge t appears after edge t+2M, i.e. N
// cycles for odd N and N-1 cycles for even N.
module dft1d
  import dft_pkg::*;
#(
  parameter int N_LEN = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cfp16_t in_data  [N_LEN],
  output logic   out_valid,
  output cfp16_t out_data [N_LEN]
);
  localparam bit EVEN = (N_LEN % 2 == 0);
  localparam int M    = EVEN ? N_LEN / 2 - 1 : (N_LEN - 1) / 2;
  localparam int LAT  = 2 * M + 1;

  // ---------------------------------------------------------------- input skew
  cfp16_t f0_d;                 // f(0) delayed by M
  cfp16_t fa_d [1:M];           // f(n) delayed by n-1
  cfp16_t fb_d [1:M];           // f(N-n) delayed by n-1

  pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(M)) u_skew_f0 (
    .clk, .rst_n, .d(in_data[0]), .q(f0_d));

  for (genvar n = 1; n <= M; n++) begin : g_skew
    pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(n - 1)) u_skew_a (
      .clk, .rst_n, .d(in_data[n]), .q(fa_d[n]));
    pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(n - 1)) u_skew_b (
      .clk, .rst_n, .d(in_data[N_LEN - n]), .q(fb_d[n]));
  end

  // ------------------------------------------------------------- first row
  cfp16_t s_chain [0:M];        // running sum of x; s_chain[0] = 0
  cfp16_t a_chain [0:M];        // alternating sum of x (even N)
  cfp16_t xv [0:M][1:M];        // x flowing down: xv[k][n] leaves row k
  cfp16_t yv [0:M][1:M];
  acc4_t  ah [1:M][0:M];        // partial sums flowing right: ah[k][n] leaves column n

  assign s_chain[0] = '0;
  assign a_chain[0] = '0;

  for (genvar n = 1; n <= M; n++) begin : g_sb1
    sb1 #(.ALT(EVEN), .ALT_SUB(n % 2 == 1)) u_sb1 (
      .clk, .rst_n,
      .f_a(fa_d[n]), .f_b(fb_d[n]), .s_in(s_chain[n-1]),
      .x_out(xv[0][n]), .y_out(yv[0][n]), .s_out(s_chain[n]),
      .a_in(a_chain[n-1]), .a_out(a_chain[n]));
  end

  cfp16_t dc, f0_col [0:M-1];   // f0_col[k-1] feeds the sb3 of row k
  cfp16_t f0_thru [1:M];        // f(0) as forwarded by each sb3

  if (!EVEN) begin : g_odd
    sb2 u_sb2 (
      .clk, .rst_n, .f0_in(f0_d), .s_in(s_chain[M]), .dc_out(dc), .f0_out(f0_col[0]));
    for (genvar k = 1; k < M; k++) begin : g_f0
      assign f0_col[k] = f0_thru[k];
    end
  end else begin : g_even
    cfp16_t fh_d, half, gp, gm;
    pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(M)) u_skew_fh (
      .clk, .rst_n, .d(in_data[N_LEN / 2]), .q(fh_d));
    sb_even #(.N_LEN(N_LEN)) u_sbe (
      .clk, .rst_n, .f0_in(f0_d), .fh_in(fh_d), .s_in(s_chain[M]), .a_in(a_chain[M]),
      .dc_out(dc), .half_out(half), .gp_out(gp), .gm_out(gm));
    // row k adds f(0) + (-1)^k f(N/2), delayed to meet it
    for (genvar k = 1; k <= M; k++) begin : g_g
      pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(k - 1)) u_g (
        .clk, .rst_n, .d((k % 2 == 0) ? gp : gm), .q(f0_col[k-1]));
    end
    pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(M)) u_align_half (
      .clk, .rst_n, .d(half), .q(out_data[N_LEN / 2]));
  end

  // ------------------------------------------------- processing cell array
  for (genvar k = 1; k <= M; k++) begin : g_row
    assign ah[k][0] = '0;
    for (genvar n = 1; n <= M; n++) begin : g_col
      pc #(.N_LEN(N_LEN), .K(k), .NIDX(n)) u_pc (
        .clk, .rst_n,
        .x_in(xv[k-1][n]), .y_in(yv[k-1][n]), .acc_in(ah[k][n-1]),
        .x_out(xv[k][n]), .y_out(yv[k][n]), .acc_out(ah[k][n]));
    end
  end

  // ------------------------------------------------------------ last column
  cfp16_t fk [1:M], fnk [1:M];
  for (genvar k = 1; k <= M; k++) begin : g_sb3
    sb3 u_sb3 (
      .clk, .rst_n, .acc_in(ah[k][M]), .f0_in(f0_col[k-1]),
      .fk_out(fk[k]), .fnk_out(fnk[k]), .f0_out(f0_thru[k]));
  end

  // ------------------------------------------------------ output alignment
  pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(M)) u_align_dc (
    .clk, .rst_n, .d(dc), .q(out_data[0]));

  for (genvar k = 1; k <= M; k++) begin : g_align
    pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(M - k)) u_align_k (
      .clk, .rst_n, .d(fk[k]), .q(out_data[k]));
    pipe_delay #(.WIDTH($bits(cfp16_t)), .DEPTH(M - k)) u_align_nk (
      .clk, .rst_n, .d(fnk[k]), .q(out_data[N_LEN - k]));
  end

  // ------------------------------------------------------------ valid track
  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[LAT-1];

  if (N_LEN < 3) begin : g_bad_n
    $error("dft1d: N_LEN must be at least 3");
  end
endmodule
