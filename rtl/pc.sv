// pc: processing cell (k, n) of the systolic 1D-DFT array, k, n = 1..M.
//
// The cell holds the hardwired coefficient W_N^(k*n) (computed at elaboration
// by dft_pkg::twiddle) and uses four fp16_mul and four fp16_add units:
//   f1 += Re[x(n)] * Re[W],  f2 += Im[y(n)] * Im[W],
//   f3 += Im[x(n)] * Re[W],  f4 += Re[y(n)] * Im[W]        (equations 15-18)
// The partial sums travel right along row k, x(n) and y(n) travel down along
// column n. A cell in column 1 is fed zero partial sums. The four
// multipliers, four adders and hardwired coefficient follow the
// architecture; generating the coefficient from N at elaboration is this
// design's choice.
// Timing: all outputs are registered, one cycle after the inputs; the
// multiply-then-add through one cell is the critical path of the array.
module pc
  import dft_pkg::*;
#(
  parameter int N_LEN = 5,   // transform length N
  parameter int K     = 1,   // output index k of this row
  parameter int NIDX  = 1    // input index n of this column
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cfp16_t x_in,
  input  cfp16_t y_in,
  input  acc4_t  acc_in,
  output cfp16_t x_out,
  output cfp16_t y_out,
  output acc4_t  acc_out
);
  localparam cfp16_t W = twiddle(N_LEN, K * NIDX);

  fp16_t p1, p2, p3, p4;
  acc4_t acc;

  fp16_mul u_m1 (.a(x_in.re), .b(W.re), .y(p1));
  fp16_mul u_m2 (.a(y_in.im), .b(W.im), .y(p2));
  fp16_mul u_m3 (.a(x_in.im), .b(W.re), .y(p3));
  fp16_mul u_m4 (.a(y_in.re), .b(W.im), .y(p4));

  fp16_add u_a1 (.a(acc_in.f1), .b(p1), .sub(1'b0), .y(acc.f1));
  fp16_add u_a2 (.a(acc_in.f2), .b(p2), .sub(1'b0), .y(acc.f2));
  fp16_add u_a3 (.a(acc_in.f3), .b(p3), .sub(1'b0), .y(acc.f3));
  fp16_add u_a4 (.a(acc_in.f4), .b(p4), .sub(1'b0), .y(acc.f4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out   <= '0;
      y_out   <= '0;
      acc_out <= '0;
    end else begin
      x_out   <= x_in;
      y_out   <= y_in;
      acc_out <= acc;
    end
  end
endmodule
