// sb2: summing block 2 of the systolic 1D-DFT, a single complex adder that
// forms the DC output F(0) = f(0) + sum_{n=1..M} x(n), where the sum arrives
// from the last sb1 of the first row. It also forwards f(0) down the last
// column, where every sb3 needs it (equations 13 and 14). The architecture
// describes SB2 as a single adder for the DC term; forwarding f(0) rather
// than the DC term to SB3 is this design's reading of equations 13-14.
// Timing: both outputs are registered, one cycle after the inputs.
module sb2
  import dft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cfp16_t f0_in,    // f(0), delayed to meet the running sum
  input  cfp16_t s_in,     // sum of x(1..M)
  output cfp16_t dc_out,   // F(0)
  output cfp16_t f0_out    // f(0) towards the first sb3
);
  cfp16_t dc;

  cfp16_addsub u_dc (.a(f0_in), .b(s_in), .sub(1'b0), .y(dc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_out <= '0;
      f0_out <= '0;
    end else begin
      dc_out <= dc;
      f0_out <= f0_in;
    end
  end
endmodule
