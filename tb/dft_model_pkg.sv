// dft_model_pkg: testbench models of the N-point DFT.
//  - dft_exact: the textbook DFT in double precision.
//  - dft_algo: the split algorithm of the systolic array (x/y pairs, four
//    real inner products, DC sum; for even N also the f(N/2) terms and the
//    alternating sum for F(N/2)) evaluated with the 16-bit reference
//    arithmetic in the same order as the hardware, so that results can be
//    compared bit for bit. Coefficients come from $cos/$sin.
package dft_model_pkg;
  import fp16_ref_pkg::*;

  localparam real PI = 3.14159265358979323846;

  typedef logic [31:0] cword_t;    // {re, im}

  function automatic void dft_exact(input int n_len, input real fr[], input real fi[],
                                    output real gr[], output real gi[]);
    gr = new[n_len];
    gi = new[n_len];
    for (int k = 0; k < n_len; k++) begin
      gr[k] = 0.0;
      gi[k] = 0.0;
      for (int n = 0; n < n_len; n++) begin
        real c, s;
        c = $cos(2.0 * PI * k * n / n_len);
        s = -$sin(2.0 * PI * k * n / n_len);
        gr[k] += fr[n] * c - fi[n] * s;
        gi[k] += fr[n] * s + fi[n] * c;
      end
    end
  endfunction

  function automatic void dft_algo(input int n_len, input cword_t f[], output cword_t g[]);
    int m;
    bit even;
    logic [15:0] xr[], xi[], yr[], yi[], sr, si, ar, ai, a1, a2, a3, a4, wr, wi, rc, ic;
    logic [31:0] gp, gm, gk;
    even = (n_len % 2 == 0);
    m = even ? n_len / 2 - 1 : (n_len - 1) / 2;
    g = new[n_len];
    xr = new[m + 1]; xi = new[m + 1]; yr = new[m + 1]; yi = new[m + 1];
    sr = 16'h0; si = 16'h0; ar = 16'h0; ai = 16'h0;
    for (int n = 1; n <= m; n++) begin
      xr[n] = ref_add(f[n][31:16], f[n_len-n][31:16], 0);
      xi[n] = ref_add(f[n][15:0],  f[n_len-n][15:0],  0);
      yr[n] = ref_add(f[n][31:16], f[n_len-n][31:16], 1);
      yi[n] = ref_add(f[n][15:0],  f[n_len-n][15:0],  1);
      sr = ref_add(sr, xr[n], 0);
      si = ref_add(si, xi[n], 0);
      ar = ref_add(ar, xr[n], n % 2 == 1);
      ai = ref_add(ai, xi[n], n % 2 == 1);
    end
    if (even) begin
      gp = {ref_add(f[0][31:16], f[n_len/2][31:16], 0), ref_add(f[0][15:0], f[n_len/2][15:0], 0)};
      gm = {ref_add(f[0][31:16], f[n_len/2][31:16], 1), ref_add(f[0][15:0], f[n_len/2][15:0], 1)};
      g[0] = {ref_add(gp[31:16], sr, 0), ref_add(gp[15:0], si, 0)};
      gk = (n_len % 4 == 0) ? gp : gm;
      g[n_len/2] = {ref_add(gk[31:16], ar, 0), ref_add(gk[15:0], ai, 0)};
    end else begin
      g[0] = {ref_add(f[0][31:16], sr, 0), ref_add(f[0][15:0], si, 0)};
    end
    for (int k = 1; k <= m; k++) begin
      a1 = 0; a2 = 0; a3 = 0; a4 = 0;
      for (int n = 1; n <= m; n++) begin
        wr = from_real($cos(2.0 * PI * ((k * n) % n_len) / n_len));
        wi = from_real(-$sin(2.0 * PI * ((k * n) % n_len) / n_len));
        a1 = ref_add(a1, ref_mul(xr[n], wr), 0);
        a2 = ref_add(a2, ref_mul(yi[n], wi), 0);
        a3 = ref_add(a3, ref_mul(xi[n], wr), 0);
        a4 = ref_add(a4, ref_mul(yr[n], wi), 0);
      end
      gk = !even ? f[0] : (k % 2 == 0) ? gp : gm;
      rc = ref_add(gk[31:16], a1, 0);
      ic = ref_add(gk[15:0], a3, 0);
      g[k]         = {ref_add(rc, a2, 1), ref_add(ic, a4, 0)};
      g[n_len - k] = {ref_add(rc, a2, 0), ref_add(ic, a4, 1)};
    end
  endfunction

endpackage
