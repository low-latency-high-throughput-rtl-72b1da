// tb_tbuf_ctrl: drives the buffer controller with rows that arrive back to
// back and with random gaps. It checks the write addresses (row count, bank
// swap after N rows), that the N columns of each matrix are read one per
// cycle starting the cycle after its last row was written (or right after
// the previous matrix's columns), and that the banks alternate.
module tb_tbuf_ctrl;
  localparam int NL = 5;
  localparam int AW = $clog2(NL);

  logic          clk = 0, rst_n = 0;
  logic          row_valid;
  logic          wr_en, wr_bank, rd_valid, rd_bank, rd_last;
  logic [AW-1:0] wr_row, rd_col;
  logic [1:0]    bank_full;
  int            checks = 0, failures = 0;
  int            cycle = 0;

  tbuf_ctrl #(.N_LEN(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int exp_row = 0, exp_wbank = 0, mats_written = 0;
  int ready_at[$];          // cycle from which each written matrix may be read
  int rd_mat = 0, exp_col = 0, last_read_end = -1, cols_due = 0;
  int concurrent = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cycle, msg);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (row_valid) begin
        chk(wr_en, "wr_en low");
        chk(int'(wr_row) == exp_row, "write row");
        chk(int'(wr_bank) == exp_wbank, "write bank");
        if (exp_row == NL - 1) begin
          exp_row = 0;
          exp_wbank ^= 1;
          ready_at.push_back(cycle + 1);
          mats_written++;
        end else exp_row++;
      end
      // a column read is due when a written matrix is ready and the previous is done
      cols_due = (ready_at.size() > 0 && ready_at[0] <= cycle) ? 1 : 0;
      chk(rd_valid == cols_due[0], "read valid");
      if (rd_valid) begin
        if (row_valid) concurrent++;
        chk(int'(rd_col) == exp_col, "read column");
        chk(int'(rd_bank) == (rd_mat % 2), "read bank");
        chk(rd_last == (exp_col == NL - 1), "last column");
        if (exp_col == NL - 1) begin
          exp_col = 0;
          rd_mat++;
          void'(ready_at.pop_front());
        end else exp_col++;
      end
      cycle++;
    end
  end

  initial begin
    row_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // back-to-back rows for four matrices
    for (int i = 0; i < 4 * NL; i++) begin
      row_valid = 1;
      @(negedge clk);
    end
    // random gaps
    for (int i = 0; i < 2000; i++) begin
      row_valid = ($urandom % 3 != 0);
      @(negedge clk);
    end
    // finish the last matrix and let the reads drain
    while (exp_row != 0) begin
      row_valid = 1;
      @(negedge clk);
    end
    row_valid = 0;
    repeat (3 * NL) @(negedge clk);
    chk(rd_mat == mats_written && mats_written > 4, "every matrix read");
    chk(concurrent > 0, "write and read in the same cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
