// sb_even: summing block for even transform lengths, used in place of sb2
// when N is even (equations 9-12, M = N/2 - 1).
//
// The unpaired input f(N/2) enters every output with sign (-1)^k, so the
// block forms both g+ = f(0) + f(N/2) and g- = f(0) - f(N/2) once and sends
// them down the last column, where the sb3 of row k adds g+ (k even) or g-
// (k odd) in place of f(0). It also forms the two outputs that have no sb3:
//   F(0)   = g+ + sum_{n=1..M} x(n)
//   F(N/2) = (f(0) + (-1)^(N/2) f(N/2)) + sum_{n=1..M} (-1)^n x(n)
// with the two sums arriving from the sb1 row. Four complex adders.
// Timing: all outputs are registered, one cycle after the inputs, the same
// slot as sb2 in an odd-length array.
module sb_even
  import dft_pkg::*;
#(
  parameter int N_LEN = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cfp16_t f0_in,    // f(0), skewed by M
  input  cfp16_t fh_in,    // f(N/2), skewed by M
  input  cfp16_t s_in,     // sum of x(1..M)
  input  cfp16_t a_in,     // alternating sum of x(1..M)
  output cfp16_t dc_out,   // F(0)
  output cfp16_t half_out, // F(N/2)
  output cfp16_t gp_out,   // f(0) + f(N/2)
  output cfp16_t gm_out    // f(0) - f(N/2)
);
  cfp16_t gp, gm, dc, half;

  cfp16_addsub u_gp   (.a(f0_in), .b(fh_in), .sub(1'b0), .y(gp));
  cfp16_addsub u_gm   (.a(f0_in), .b(fh_in), .sub(1'b1), .y(gm));
  cfp16_addsub u_dc   (.a(gp), .b(s_in), .sub(1'b0), .y(dc));
  cfp16_addsub u_half (.a((N_LEN % 4 == 0) ? gp : gm), .b(a_in), .sub(1'b0), .y(half));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_out   <= '0;
      half_out <= '0;
      gp_out   <= '0;
      gm_out   <= '0;
    end else begin
      dc_out   <= dc;
      half_out <= half;
      gp_out   <= gp;
      gm_out   <= gm;
    end
  end
endmodule
