// fp16_mul: combinational multiplier for the 16-bit floating point format of
// dft_pkg (1 sign, 5 exponent, 10 fraction bits).
//
// Following the architecture, the two 11-bit significands are multiplied, the
// exponents are added, and the product is normalised and rounded. The
// significand product uses radix-4 modified Booth recoding: the multiplier is
// scanned in overlapping 3-bit groups, each group selects 0, +-A or +-2A, and
// the six shifted partial products are summed. Rounding is to nearest, ties
// to even, on the exact 22-bit product. Design choices beyond the document:
// zero exponent field means zero (products below the normal range flush to
// +0, a zero operand gives +0), all-ones exponent means infinity (overflow
// and any infinite operand give infinity), no NaN.
// Timing: purely combinational; the processing cells register its output.
module fp16_mul
  import dft_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic [10:0] ma, mb;
  logic [12:0] mb_ext;       // multiplier with two zero bits on top
  logic [2:0]  grp;
  logic signed [24:0] pp;
  logic signed [24:0] acc;
  logic [21:0] prod;
  logic [11:0] mant;
  logic        guard, sticky;
  int          e;

  always_comb begin
    ma     = {1'b1, a.man};
    mb     = {1'b1, b.man};
    mb_ext = {2'b00, mb};
    acc    = '0;
    for (int i = 0; i < 6; i++) begin
      grp = {mb_ext[2*i+1], mb_ext[2*i], (i == 0) ? 1'b0 : mb_ext[2*i-1]};
      case (grp)
        3'b001, 3'b010: pp = 25'(signed'({1'b0, ma}));
        3'b011:         pp = 25'(signed'({1'b0, ma, 1'b0}));
        3'b100:         pp = -25'(signed'({1'b0, ma, 1'b0}));
        3'b101, 3'b110: pp = -25'(signed'({1'b0, ma}));
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    prod = acc[21:0];

    if (prod[21]) begin
      mant   = {1'b0, prod[21:11]};
      guard  = prod[10];
      sticky = |prod[9:0];
      e      = int'(a.exp) + int'(b.exp) - int'(FP_BIAS) + 1;
    end else begin
      mant   = {1'b0, prod[20:10]};
      guard  = prod[9];
      sticky = |prod[8:0];
      e      = int'(a.exp) + int'(b.exp) - int'(FP_BIAS);
    end
    if (guard && (sticky || mant[0])) mant = mant + 12'd1;
    if (mant[11]) begin
      mant = mant >> 1;
      e    = e + 1;
    end

    y.sign = a.sign ^ b.sign;
    y.exp  = 5'(e);
    y.man  = mant[9:0];
    if (a.exp == 5'd31 || b.exp == 5'd31 || e >= 31) begin
      y.exp = 5'd31;
      y.man = '0;
    end else if (a.exp == 5'd0 || b.exp == 5'd0 || e <= 0) begin
      y = FP_ZERO;
    end
  end

endmodule
