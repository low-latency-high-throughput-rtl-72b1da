// tb_dft2d_n32: runs the 32 x 32 transform, the smallest even size of the
// architecture's complexity table, on the complete design (dft2d_top with
// N_LEN = 32). Three random integer matrices stream back to back. Every row
// result and output column is checked bit for bit against the arithmetic
// model of the split algorithm, every output against the textbook 2D-DFT
// within a tolerance, and the first-column latency (3N-2 cycles for even N)
// and the one-matrix-per-N-cycles rate are checked.
module tb_dft2d_n32;
  import dft_pkg::*;
  import fp16_ref_pkg::*;
  import dft_model_pkg::*;

  localparam int NL   = 32;
  localparam int AW   = $clog2(NL);
  localparam int NMAT = 3;
  localparam int LATC = 3 * NL - 2;

  logic               clk = 0, rst_n = 0;
  logic               in_valid;
  logic signed [15:0] in_row [NL];
  logic               row_valid, out_valid, buf_wr_bank, buf_rd_bank;
  cfp16_t             row_dft [NL], out_col [NL];
  logic [AW-1:0]      out_col_idx;
  int                 checks = 0, failures = 0, cycle = 0;

  dft2d_top #(.N_LEN(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  int     v     [NMAT][NL][NL];
  int     t_first [NMAT];
  cword_t inter [NMAT][NL][NL];
  cword_t res   [NMAT][NL][NL];
  int     rows_seen = 0, cols_seen = 0, last_done = -1;

  task automatic model(input int j);
    cword_t f[], g[];
    f = new[NL];
    for (int m = 0; m < NL; m++) begin
      for (int n = 0; n < NL; n++) f[n] = {from_real(real'(v[j][m][n])), 16'h0000};
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
    real tol, er, ei, gr, gi;
    tol = 20.0 * NL * NL / 32.0;
    for (int k = 0; k < NL; k++) begin
      gr = 0.0; gi = 0.0;
      for (int m = 0; m < NL; m++)
        for (int n = 0; n < NL; n++) begin
          gr += v[j][m][n] * $cos(2.0 * PI * ((k * m + l * n) % NL) / NL);
          gi -= v[j][m][n] * $sin(2.0 * PI * ((k * m + l * n) % NL) / NL);
        end
      er = to_real(out_col[k].re) - gr;
      ei = to_real(out_col[k].im) - gi;
      chk(er <= tol && er >= -tol && ei <= tol && ei >= -tol,
          $sformatf("F(%0d,%0d) off the exact DFT by %f, %f", k, l, er, ei));
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
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
              $sformatf("mat %0d F(%0d,%0d) = %h, model %h", j, k, l, out_col[k], res[j][k][l]));
        check_exact(j, l);
        if (l == 0) chk(cycle - t_first[j] == LATC, $sformatf("first-column latency %0d", cycle - t_first[j]));
        if (l == NL - 1) begin
          if (j > 0) chk(cycle - last_done == NL, "one matrix every N cycles");
          last_done = cycle;
        end
        cols_seen++;
      end
      cycle++;
    end
  end

  initial begin
    in_valid = 0;
    for (int n = 0; n < NL; n++) in_row[n] = '0;
    for (int j = 0; j < NMAT; j++) begin
      for (int m = 0; m < NL; m++)
        for (int n = 0; n < NL; n++) v[j][m][n] = int'($urandom % 41) - 20;
      model(j);
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NMAT; j++)
      for (int m = 0; m < NL; m++) begin
        in_valid = 1;
        if (m == 0) t_first[j] = cycle;
        for (int n = 0; n < NL; n++) in_row[n] = 16'(v[j][m][n]);
        @(negedge clk);
      end
    in_valid = 0;
    repeat (4 * NL) @(negedge clk);
    chk(cols_seen == NMAT * NL, "all columns delivered");
    chk(rows_seen == NMAT * NL, "all rows delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
