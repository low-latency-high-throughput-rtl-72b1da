// fp16_add: combinational adder/subtractor for the 16-bit floating point
// format of dft_pkg (1 sign, 5 exponent, 10 fraction bits).
//
// y = a + b when sub = 0, y = a - b when sub = 1. As in the architecture, the
// exponents are first made equal by shifting the smaller operand right, the
// aligned significands are added (or subtracted), and the result is
// normalised and rounded. The alignment keeps 16 bits below the fraction and
// folds everything shifted further into a sticky bit, so the result is the
// exact sum rounded once to nearest, ties to even. Design choices beyond the
// document: a zero exponent field is zero (no subnormals, tiny results flush
// to +0), an all-ones exponent field is infinity (overflow gives infinity, no
// NaN), an exact zero result is +0. The significand adder is written as '+'
// so that synthesis can map it to a carry look-ahead adder.
// Timing: purely combinational; the cells that use it register its output.
module fp16_add
  import dft_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  input  logic  sub,
  output fp16_t y
);

  localparam int W = 27;   // 11 significand bits + 16 alignment bits

  logic        b_sign;
  logic        a_zero, b_zero, a_inf, b_inf;
  logic        swap;
  logic        l_sign, s_sign;
  logic [4:0]  l_exp, s_exp;
  logic [10:0] l_man, s_man;
  logic [4:0]  diff;
  logic [W-1:0] big, small_al, small_lost;
  logic         sticky;
  logic [W:0]   res;
  logic [W:0]   norm;
  int           lead;
  int           e;
  logic [11:0]  mant;
  logic         guard, rsticky;

  always_comb begin
    b_sign = b.sign ^ sub;
    a_zero = (a.exp == 5'd0);
    b_zero = (b.exp == 5'd0);
    a_inf  = (a.exp == 5'd31);
    b_inf  = (b.exp == 5'd31);

    // order the operands by magnitude
    swap   = {b.exp, b.man} > {a.exp, a.man};
    l_sign = swap ? b_sign : a.sign;
    s_sign = swap ? a.sign : b_sign;
    l_exp  = swap ? b.exp  : a.exp;
    s_exp  = swap ? a.exp  : b.exp;
    l_man  = {1'b1, swap ? b.man : a.man};
    s_man  = {1'b1, swap ? a.man : b.man};
    diff   = l_exp - s_exp;

    // align the smaller significand, collecting the shifted-out bits
    big        = {l_man, 16'b0};
    small_al   = {s_man, 16'b0} >> diff;
    small_lost = {s_man, 16'b0} & ~(small_al << diff);
    sticky     = |small_lost;
    small_al[0] = small_al[0] | sticky;

    if (l_sign == s_sign) res = {1'b0, big} + {1'b0, small_al};
    else                  res = {1'b0, big} - {1'b0, small_al};

    // normalise: leading one to bit W
    lead = 0;
    for (int i = 0; i <= W; i++)
      if (res[i]) lead = i;
    norm    = res << (W - lead);
    mant    = {1'b0, norm[W:W-10]};
    guard   = norm[W-11];
    rsticky = |norm[W-12:0];
    if (guard && (rsticky || mant[0])) mant = mant + 12'd1;
    e = int'(l_exp) + lead - (W - 1);
    if (mant[11]) begin
      mant = mant >> 1;
      e    = e + 1;
    end

    if (a_inf || b_inf) begin
      y.sign = a_inf ? a.sign : b_sign;
      y.exp  = 5'd31;
      y.man  = '0;
    end else if (a_zero && b_zero) begin
      y = FP_ZERO;
    end else if (a_zero) begin
      y.sign = b_sign;
      y.exp  = b.exp;
      y.man  = b.man;
    end else if (b_zero) begin
      y = a;
    end else if (res == '0 || e <= 0) begin
      y = FP_ZERO;
    end else if (e >= 31) begin
      y.sign = l_sign;
      y.exp  = 5'd31;
      y.man  = '0;
    end else begin
      y.sign = l_sign;
      y.exp  = 5'(e);
      y.man  = mant[9:0];
    end
  end

endmodule
