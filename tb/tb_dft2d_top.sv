// tb_dft2d_top: end-to-end test of the 2D-DFT at its default size (5 x 5).
// Streams random 16-bit integer matrices row by row: first several matrices
// back to back, then matrices with idle cycles between and inside them. It
// checks
//  - every row result (the 1D-DFT outputs) bit for bit against the
//    arithmetic model of the split algorithm,
//  - every output column bit for bit against the same model applied to the
//    columns of the modelled intermediate matrix, and within a tolerance
//    against the textbook 2D-DFT,
//  - the column order, the latency of the first column (3N cycles after the
//    first row) and the rate of one matrix per N cycles when streaming.
// It counts how often each mechanism occurred: back-to-back matrices, row
// writes into either bank while the other bank is read, idle input cycles
// inside a matrix and between matrices; each must occur at least once.
module tb_dft2d_top;
  import dft_pkg::*;
  import fp16_ref_pkg::*;
  import dft_model_pkg::*;

  localparam int NL   = 5;
  localparam int AW   = $clog2(NL);
  localparam int NMAT = 40;

  logic               clk = 0, rst_n = 0;
  logic               in_valid;
  logic signed [15:0] in_row [NL];
  logic               row_valid, out_valid, buf_wr_bank, buf_rd_bank;
  cfp16_t             row_dft [NL], out_col [NL];
  logic [AW-1:0]      out_col_idx;
  int                 checks = 0, failures = 0, cycle = 0;

  dft2d_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s", cycle, msg);
    end
  endtask

  // ------------------------------------------------------ stimulus record
  typedef struct {
    int   v [NL][NL];     // integer input f(m, n)
    int   t_first;        // cycle of the first row
  } mat_t;
  mat_t   mats [NMAT];
  cword_t inter [NMAT][NL][NL];   // modelled F'(m, l)
  cword_t res   [NMAT][NL][NL];   // modelled F(k, l), indexed [k][l]

  // --------------------------------------------------- mechanism counters
  int n_back_to_back = 0, n_gap_inside = 0, n_gap_between = 0;
  int n_overlap_bank0 = 0, n_overlap_bank1 = 0;
  int rows_seen = 0, cols_seen = 0;
  int last_mat_done_cycle = -1, n_rate_ok = 0;

  // model of one matrix
  task automatic model(input int j);
    cword_t f[], g[];
    f = new[NL];
    for (int m = 0; m < NL; m++) begin
      for (int n = 0; n < NL; n++) f[n] = {from_real(real'(mats[j].v[m][n])), 16'h0000};
      dft_algo(NL, f, g);
      for (int l = 0; l < NL; l++) inter[j][m][l] = g[l];
    end
    for (int l = 0; l < NL; l++) begin
      for (int m = 0; m < NL; m++) f[m] = inter[j][m][l];
      dft_algo(NL, f, g);
      for (int k = 0; k < NL; k++) res[j][k][l] = g[k];
    end
  endtask

  task automatic check_exact(input int j, input int l);
    real tol, sum_abs, er, ei, gr, gi;
    sum_abs = 0.0;
    for (int m = 0; m < NL; m++)
      for (int n = 0; n < NL; n++) sum_abs += (mats[j].v[m][n] < 0) ? -mats[j].v[m][n] : mats[j].v[m][n];
    tol = sum_abs * NL / 512.0 + 0.5;
    for (int k = 0; k < NL; k++) begin
      gr = 0.0; gi = 0.0;
      for (int m = 0; m < NL; m++)
        for (int n = 0; n < NL; n++) begin
          gr += mats[j].v[m][n] * $cos(2.0 * PI * (k * m + l * n) / NL);
          gi -= mats[j].v[m][n] * $sin(2.0 * PI * (k * m + l * n) / NL);
        end
      er = to_real(out_col[k].re) - gr;
      ei = to_real(out_col[k].im) - gi;
      chk(er <= tol && er >= -tol && ei <= tol && ei >= -tol, "2D result off the exact DFT");
    end
  endtask

  // ------------------------------------------------------------ monitors
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.wr_en && dut.u_ctrl.rd_valid) begin
        if (buf_wr_bank) n_overlap_bank1++;
        else             n_overlap_bank0++;
      end
      if (row_valid) begin
        int j, m;
        j = rows_seen / NL;
        m = rows_seen % NL;
        for (int l = 0; l < NL; l++)
          chk(row_dft[l] === inter[j][m][l], $sformatf("row DFT mat %0d row %0d col %0d", j, m, l));
        rows_seen++;
      end
      if (out_valid) begin
        int j, l;
        j = cols_seen / NL;
        l = cols_seen % NL;
        chk(int'(out_col_idx) == l, "column index");
        for (int k = 0; k < NL; k++)
          chk(out_col[k] === res[j][k][l],
              $sformatf("2D DFT mat %0d F(%0d,%0d) = %h, model %h", j, k, l, out_col[k], res[j][k][l]));
        check_exact(j, l);
        if (l == 0) chk(cycle - mats[j].t_first >= 3 * NL, "first column too early");
        if (l == 0 && j == 0) chk(cycle - mats[j].t_first == 3 * NL, "latency of the first column");
        if (l == NL - 1) begin
          if (j < 6 && j > 0) begin
            chk(cycle - last_mat_done_cycle == NL, "one matrix every N cycles");
            n_rate_ok++;
          end
          last_mat_done_cycle = cycle;
        end
        cols_seen++;
      end
      cycle++;
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    in_valid = 0;
    for (int n = 0; n < NL; n++) in_row[n] = '0;
    for (int j = 0; j < NMAT; j++) begin
      for (int m = 0; m < NL; m++)
        for (int n = 0; n < NL; n++) begin
          // mostly small values; an occasional matrix uses the full 16-bit
          // range on a few entries with the others at zero (stays in range)
          mats[j].v[m][n] = int'($urandom % 2001) - 1000;
          if (j % 10 == 9) mats[j].v[m][n] = (m == n) ? int'(16'($urandom)) - 32768 : 0;
          if (j % 10 == 9 && m == n && m > 0) mats[j].v[m][n] = mats[j].v[m][n] / 8;
        end
      model(j);
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NMAT; j++) begin
      for (int m = 0; m < NL; m++) begin
        // idle cycles inside a matrix (after the first 6 matrices)
        if (j >= 6 && $urandom % 4 == 0) begin
          in_valid = 0;
          n_gap_inside++;
          @(negedge clk);
        end
        in_valid = 1;
        if (m == 0) mats[j].t_first = cycle;
        for (int n = 0; n < NL; n++) in_row[n] = 16'(mats[j].v[m][n]);
        @(negedge clk);
      end
      if (j < 6) n_back_to_back++;
      if (j >= 6 && $urandom % 2 == 0) begin
        in_valid = 0;
        repeat (1 + $urandom % (2 * NL)) @(negedge clk);
        n_gap_between++;
      end
    end
    in_valid = 0;
    repeat (4 * NL) @(negedge clk);
    chk(cols_seen == NMAT * NL, "all columns delivered");
    chk(rows_seen == NMAT * NL, "all rows delivered");
    $display("mechanisms: back_to_back=%0d gaps_inside=%0d gaps_between=%0d overlap_bank0=%0d overlap_bank1=%0d rate_checks=%0d",
             n_back_to_back, n_gap_inside, n_gap_between, n_overlap_bank0, n_overlap_bank1, n_rate_ok);
    chk(n_back_to_back > 0, "back-to-back matrices never happened");
    chk(n_gap_inside > 0, "idle cycle inside a matrix never happened");
    chk(n_gap_between > 0, "idle cycles between matrices never happened");
    chk(n_overlap_bank0 > 0 && n_overlap_bank1 > 0, "concurrent write/read on both banks never happened");
    chk(n_rate_ok > 0, "streaming rate never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
