// dft_pkg: types and constant functions shared by the 2D-DFT datapath.
//
// Number format: every real value is a 16-bit floating point word with 1 sign
// bit, a 5-bit exponent (bias 15) and a 10-bit fraction with a hidden leading
// one, as the architecture specifies. A complex value is a 32-bit pair
// {re, im}. The choices this design adds on top of the format: an exponent
// field of 0 means zero (subnormals are flushed to zero), an exponent field of
// 31 means infinity (there is no NaN), rounding is to nearest, ties to even.
//
// The DFT coefficients W_N^p = cos(2*pi*p/N) - j*sin(2*pi*p/N) are hardwired
// constants in each processing cell. They are computed here at elaboration
// with integer arithmetic only: the angle is folded into the first quadrant,
// cos and sin are summed as Taylor series in Q30 fixed point, and the result is
// rounded to the 16-bit format. This keeps the coefficient set a function of
// the transform length N instead of a stored table.
package dft_pkg;

  typedef struct packed {
    logic       sign;
    logic [4:0] exp;
    logic [9:0] man;
  } fp16_t;

  typedef struct packed {
    fp16_t re;
    fp16_t im;
  } cfp16_t;

  // the four partial inner products F1..F4 of one DFT output pair
  typedef struct packed {
    fp16_t f1;   // sum Re[x(n)] Re[W^kn]
    fp16_t f2;   // sum Im[y(n)] Im[W^kn]
    fp16_t f3;   // sum Im[x(n)] Re[W^kn]
    fp16_t f4;   // sum Re[y(n)] Im[W^kn]
  } acc4_t;

  localparam int unsigned FP_BIAS = 15;
  localparam fp16_t FP_ZERO = '0;

  // Rounds a signed Q30 fixed-point value (|v| <= 2^30) to the 16-bit format.
  function automatic fp16_t q30_to_fp16(input longint v);
    fp16_t   r;
    longint  a;
    int      lead;
    longint  mant;
    longint  rest;
    longint  half;
    int      e;
    r = FP_ZERO;
    a = (v < 0) ? -v : v;
    if (a != 0) begin
      lead = 0;
      for (int i = 0; i < 62; i++)
        if (a >= (longint'(1) << i)) lead = i;
      // keep 11 significant bits, round the rest to nearest even
      if (lead <= 10) begin
        mant = a << (10 - lead);
      end else begin
        mant = a >> (lead - 10);
        rest = a - (mant << (lead - 10));
        half = longint'(1) << (lead - 11);
        if (rest > half || (rest == half && mant[0]))
          mant = mant + 1;
      end
      e = lead - 30 + FP_BIAS;
      if (mant == 2048) begin
        mant = 1024;
        e = e + 1;
      end
      if (e >= 1) begin
        r.sign = (v < 0);
        r.exp  = 5'(e);
        r.man  = mant[9:0];
      end
    end
    return r;
  endfunction

  // cos and sin of phi (Q30, 0 <= phi < pi/2) by Taylor series in Q30.
  function automatic longint q30_cos(input longint phi);
    longint p2, term, sum;
    p2   = (phi * phi) >>> 30;
    term = longint'(1) << 30;
    sum  = term;
    for (int i = 1; i <= 10; i++) begin
      term = -((term * p2) >>> 30) / longint'((2 * i - 1) * (2 * i));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic longint q30_sin(input longint phi);
    longint p2, term, sum;
    p2   = (phi * phi) >>> 30;
    term = phi;
    sum  = term;
    for (int i = 1; i <= 10; i++) begin
      term = -((term * p2) >>> 30) / longint'((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // pi/2 in Q30
  localparam longint HALF_PI_Q30 = 64'd1686629713;

  // W_N^p = cos(2 pi p / N) - j sin(2 pi p / N), rounded to the 16-bit format.
  function automatic cfp16_t twiddle(input int n_len, input int p);
    int     pm, quad, rem;
    longint phi, c, s, wr, wi;
    cfp16_t w;
    pm   = p % n_len;
    quad = (4 * pm) / n_len;
    rem  = 4 * pm - quad * n_len;
    phi  = (HALF_PI_Q30 * longint'(rem)) / longint'(n_len);
    c    = q30_cos(phi);
    s    = q30_sin(phi);
    case (quad)
      0:       begin wr =  c; wi = -s; end
      1:       begin wr = -s; wi = -c; end
      2:       begin wr = -c; wi =  s; end
      default: begin wr =  s; wi =  c; end
    endcase
    w.re = q30_to_fp16(wr);
    w.im = q30_to_fp16(wi);
    return w;
  endfunction

endpackage
