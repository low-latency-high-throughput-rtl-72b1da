// tbuf_ctrl: finite state machine that steers the transformed rows of the
// first 1D-DFT block into the intermediate buffer and the buffered columns
// into the second block.
//
// Write side: every valid row from the first block goes to row wr_row of bank
// wr_bank; after row N-1 the bank is marked full and writing moves to the
// other bank. Read side: as soon as the bank to be read is full, its N
// columns are read, one per cycle (rd_valid high, column rd_col); after the
// last column the bank is released and reading moves on to the other bank,
// without an idle cycle if that one is already full. The state of the machine
// is the two bank-full flags, the write bank and row, and the read bank and
// column. With rows arriving
// at most one per cycle the two banks alternate (ping-pong) and a bank is
// always released before it is written again; an assertion checks this.
// The bank-full flags are brought out for observation. The architecture
// names an FSM for this job without giving its states; counters plus two
// flags are this design's choice.
// Timing: the first column of a matrix is read in the cycle after its last
// row was written.
module tbuf_ctrl #(
  parameter int N_LEN = 5,
  localparam int AW = (N_LEN > 1) ? $clog2(N_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          row_valid,   // a transformed row is on the write port
  output logic          wr_en,
  output logic          wr_bank,
  output logic [AW-1:0] wr_row,
  output logic          rd_valid,    // the column on the read port is valid
  output logic          rd_bank,
  output logic [AW-1:0] rd_col,
  output logic          rd_last,     // last column of a matrix
  output logic [1:0]    bank_full
);
  logic [1:0] full;

  assign wr_en     = row_valid;
  assign bank_full = full;
  assign rd_valid  = full[rd_bank];
  assign rd_last   = rd_valid && (rd_col == AW'(N_LEN - 1));

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_row  <= '0;
    end else if (row_valid) begin
      if (wr_row == AW'(N_LEN - 1)) begin
        wr_row  <= '0;
        wr_bank <= ~wr_bank;
      end else begin
        wr_row <= wr_row + 1'b1;
      end
    end
  end

  // read side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank <= 1'b0;
      rd_col  <= '0;
    end else begin
      if (rd_valid) begin
        if (rd_last) begin
          rd_col  <= '0;
          rd_bank <= ~rd_bank;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end
    end
  end

  // bank full flags: set by the last row written, cleared by the last column read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (row_valid && wr_row == AW'(N_LEN - 1) && wr_bank == b[0]) full[b] <= 1'b1;
        else if (rd_last && rd_bank == b[0])                            full[b] <= 1'b0;
      end
    end
  end

  // a row must never be written into a bank that still waits to be read
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    row_valid |-> !full[wr_bank]);
endmodule
