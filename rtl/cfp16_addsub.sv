// cfp16_addsub: complex adder/subtractor built from two fp16_add units, one
// for the real and one for the imaginary part. y = a + b (sub = 0) or
// y = a - b (sub = 1). Combinational.
module cfp16_addsub
  import dft_pkg::*;
(
  input  cfp16_t a,
  input  cfp16_t b,
  input  logic   sub,
  output cfp16_t y
);
  fp16_add u_re (.a(a.re), .b(b.re), .sub(sub), .y(y.re));
  fp16_add u_im (.a(a.im), .b(b.im), .sub(sub), .y(y.im));
endmodule
