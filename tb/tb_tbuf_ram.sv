// tb_tbuf_ram: writes random rows into both banks of the buffer and reads
// columns back, checking every cell against a shadow copy kept by the
// testbench; reading one bank while the other is written must see the old
// contents of the read bank.
module tb_tbuf_ram;
  import dft_pkg::*;

  localparam int NL = 5;
  localparam int AW = $clog2(NL);

  logic          clk = 0;
  logic          wr_en, wr_bank, rd_bank;
  logic [AW-1:0] wr_row, rd_col;
  cfp16_t        wr_data [NL], rd_data [NL];
  logic [31:0]   shadow [2][NL][NL];
  int            checks = 0, failures = 0;

  tbuf_ram #(.N_LEN(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_bank = 0; wr_row = 0; rd_bank = 0; rd_col = 0;
    for (int l = 0; l < NL; l++) wr_data[l] = '0;
    // fill both banks
    for (int b = 0; b < 2; b++)
      for (int m = 0; m < NL; m++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = b[0]; wr_row = AW'(m);
        for (int l = 0; l < NL; l++) begin
          wr_data[l] = $urandom;
          shadow[b][m][l] = wr_data[l];
        end
      end
    @(negedge clk);
    wr_en = 0;
    // random concurrent writes and column reads
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_bank = 1'($urandom);
      rd_col  = AW'($urandom % NL);
      #1;
      for (int m = 0; m < NL; m++) begin
        checks++;
        if (rd_data[m] !== shadow[rd_bank][m][rd_col]) begin
          failures++;
          if (failures < 10)
            $display("bank %0d cell (%0d,%0d) read %h expected %h", rd_bank, m, rd_col,
                     rd_data[m], shadow[rd_bank][m][rd_col]);
        end
      end
      wr_en   = 1'($urandom);
      wr_bank = ~rd_bank;
      wr_row  = AW'($urandom % NL);
      for (int l = 0; l < NL; l++) wr_data[l] = $urandom;
      @(posedge clk);
      if (wr_en)
        for (int l = 0; l < NL; l++) shadow[wr_bank][wr_row][l] = wr_data[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
