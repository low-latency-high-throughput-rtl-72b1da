// fp16_ref_pkg: reference model of the 16-bit floating point format, used by
// the testbenches to work out expected results independently of the RTL.
// Values are converted to double precision (exact for this format), the
// operation is done in double precision (exact for one sum or one product of
// two 16-bit values) and the result is rounded once to nearest, ties to even,
// with the same range rules as the RTL: results below 2^-14 become +0,
// results of 2^16 and above become infinity, a zero result is +0.
package fp16_ref_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(input logic [15:0] h);
    real m;
    if (h[14:10] == 5'd0) return 0.0;
    if (h[14:10] == 5'd31) return h[15] ? -1.0e30 : 1.0e30;
    m = (1024.0 + real'(h[9:0])) * pow2(int'(h[14:10]) - 25);
    return h[15] ? -m : m;
  endfunction

  function automatic logic [15:0] from_real(input real r);
    real a, m, fl, frac;
    int  e, be;
    logic s;
    if (r == 0.0) return 16'h0000;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a >= 65536.0) return {s, 5'd31, 10'd0};
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    m = a / pow2(e - 10);
    fl = $floor(m);
    frac = m - fl;
    if (frac > 0.5 || (frac == 0.5 && (longint'(fl) % 2 == 1))) fl = fl + 1.0;
    if (fl >= 2048.0) begin
      fl = 1024.0;
      e++;
    end
    be = e + 15;
    if (be <= 0) return 16'h0000;
    if (be >= 31) return {s, 5'd31, 10'd0};
    return {s, 5'(be), 10'(longint'(fl) - 1024)};
  endfunction

  function automatic logic [15:0] ref_add(input logic [15:0] a, input logic [15:0] b,
                                          input logic sub);
    return from_real(to_real(a) + (sub ? -to_real(b) : to_real(b)));
  endfunction

  function automatic logic [15:0] ref_mul(input logic [15:0] a, input logic [15:0] b);
    return from_real(to_real(a) * to_real(b));
  endfunction

  // random finite non-zero value with exponent field in [lo, hi]
  function automatic logic [15:0] rand_fp(input int lo, input int hi);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(lo + ($urandom % (hi - lo + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction

endpackage
