// sb3: summing block 3 of the systolic 1D-DFT, one per output index k = 1..M
// in the last column of the array.
//
// From the four inner products F1..F4 of row k and f(0) it forms the output
// pair (equations 13 and 14)
//   F(k)   = f(0) + (F1 - F2) + j (F3 + F4)
//   F(N-k) = f(0) + (F1 + F2) + j (F3 - F4)
// with six real adders: f(0).re + F1 and f(0).im + F3 are shared by both
// outputs. f(0) is forwarded down to the next sb3. The architecture's text
// counts five add/subtract operations here; the equations need six.
// Timing: all outputs are registered, one cycle after the inputs.
module sb3
  import dft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  acc4_t  acc_in,   // F1..F4 from processing cell (k, M)
  input  cfp16_t f0_in,    // f(0) from sb2 or the sb3 above
  output cfp16_t fk_out,   // F(k)
  output cfp16_t fnk_out,  // F(N-k)
  output cfp16_t f0_out
);
  fp16_t  re_c, im_c;
  cfp16_t fk, fnk;

  fp16_add u_rc  (.a(f0_in.re), .b(acc_in.f1), .sub(1'b0), .y(re_c));
  fp16_add u_ic  (.a(f0_in.im), .b(acc_in.f3), .sub(1'b0), .y(im_c));
  fp16_add u_rk  (.a(re_c),     .b(acc_in.f2), .sub(1'b1), .y(fk.re));
  fp16_add u_ik  (.a(im_c),     .b(acc_in.f4), .sub(1'b0), .y(fk.im));
  fp16_add u_rnk (.a(re_c),     .b(acc_in.f2), .sub(1'b0), .y(fnk.re));
  fp16_add u_ink (.a(im_c),     .b(acc_in.f4), .sub(1'b1), .y(fnk.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fk_out  <= '0;
      fnk_out <= '0;
      f0_out  <= '0;
    end else begin
      fk_out  <= fk;
      fnk_out <= fnk;
      f0_out  <= f0_in;
    end
  end
endmodule
