// int2fp: converts a 16-bit two's-complement integer sample into the 16-bit
// floating point format of dft_pkg. This is the preprocessing stage in front
// of the first 1D-DFT block: each integer input becomes the real part of a
// complex value whose imaginary part is zero.
//
// The magnitude is taken, its leading one found, the top 11 significant bits
// kept and the rest rounded to nearest, ties to even (the rounding rule is
// this design's choice; every 16-bit integer is inside the format's range, so
// no overflow can occur). Zero converts to +0.
// Timing: purely combinational.
module int2fp
  import dft_pkg::*;
(
  input  logic signed [15:0] din,
  output cfp16_t             dout
);

  logic [15:0] mag;
  logic [15:0] norm;
  int          lead;
  logic [11:0] mant;
  logic        guard, sticky;
  int          e;

  always_comb begin
    mag  = din[15] ? 16'(-din) : din;
    lead = 0;
    for (int i = 0; i < 16; i++)
      if (mag[i]) lead = i;
    norm   = mag << (15 - lead);
    mant   = {1'b0, norm[15:5]};
    guard  = norm[4];
    sticky = |norm[3:0];
    if (guard && (sticky || mant[0])) mant = mant + 12'd1;
    e = lead + int'(FP_BIAS);
    if (mant[11]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    dout.im = FP_ZERO;
    if (mag == '0) begin
      dout.re = FP_ZERO;
    end else begin
      dout.re.sign = din[15];
      dout.re.exp  = 5'(e);
      dout.re.man  = mant[9:0];
    end
  end

endmodule
