// sb1: summing block 1 of the systolic 1D-DFT, one per index n = 1..M in the
// first row of the array.
//
// It receives the input pair f(n) and f(N-n) and forms, with three complex
// adder cells,
//   x(n) = f(n) + f(N-n)          (passed down to the processing cells)
//   y(n) = f(n) - f(N-n)          (passed down to the processing cells)
//   s_out = s_in + x(n)           (running sum towards the DC term, passed
//                                  right to the next sb1 and finally to sb2)
// The running-sum cell is how this design reads the third adder cell of the
// block; the document gives SB1 three adder cells and makes SB2 a single
// adder that forms the DC component.
// For even N only (ALT = 1) a fourth complex adder keeps the alternating sum
//   a_out = a_in + (-1)^n x(n)    (ALT_SUB = 1 for odd n)
// that the F(N/2) output of equation 12 needs; with ALT = 0 a_out is zero and
// the adder is not built.
// Timing: all outputs are registered, one cycle after the inputs.
module sb1
  import dft_pkg::*;
#(
  parameter bit ALT     = 1'b0,
  parameter bit ALT_SUB = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cfp16_t f_a,      // f(n)
  input  cfp16_t f_b,      // f(N-n)
  input  cfp16_t s_in,     // sum of x(1..n-1)
  output cfp16_t x_out,
  output cfp16_t y_out,
  output cfp16_t s_out,
  input  cfp16_t a_in,     // alternating sum of x(1..n-1) (even N)
  output cfp16_t a_out
);
  cfp16_t x, y, s;

  cfp16_addsub u_x (.a(f_a),  .b(f_b), .sub(1'b0), .y(x));
  cfp16_addsub u_y (.a(f_a),  .b(f_b), .sub(1'b1), .y(y));
  cfp16_addsub u_s (.a(s_in), .b(x),   .sub(1'b0), .y(s));

  if (ALT) begin : g_alt
    cfp16_t a;
    cfp16_addsub u_a (.a(a_in), .b(x), .sub(ALT_SUB), .y(a));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) a_out <= '0;
      else        a_out <= a;
    end
  end else begin : g_no_alt
    assign a_out = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out <= '0;
      y_out <= '0;
      s_out <= '0;
    end else begin
      x_out <= x;
      y_out <= y;
      s_out <= s;
    end
  end
endmodule
