// tb_dft1d: streams complex vectors into three dft1d instances (N = 5, the
// default, N = 11, and the even length N = 8), one vector per cycle with
// occasional idle cycles.
// Each output vector is checked bit for bit against the arithmetic model of
// the split algorithm and, within a tolerance, against the textbook DFT. The
// latency (N cycles for odd N, N-1 for even N) is checked too.
module tb_dft1d;
  import dft_pkg::*;
  import fp16_ref_pkg::*;
  import dft_model_pkg::*;

  localparam int NA = 5;
  localparam int NB = 11;
  localparam int NC = 8;
  localparam int NVEC = 300;

  logic   clk = 0, rst_n = 0;
  int     cycle = 0;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- N = 5
  logic   va, vao;
  cfp16_t ia [NA], oa [NA];
  dft1d #(.N_LEN(NA)) dut_a (.clk, .rst_n, .in_valid(va), .in_data(ia),
                             .out_valid(vao), .out_data(oa));
  // ---------------------------------------------------------------- N = 11
  logic   vb, vbo;
  cfp16_t ib [NB], ob [NB];
  dft1d #(.N_LEN(NB)) dut_b (.clk, .rst_n, .in_valid(vb), .in_data(ib),
                             .out_valid(vbo), .out_data(ob));

  // ---------------------------------------------------------------- N = 8
  logic   vc, vco;
  cfp16_t ic [NC], oc [NC];
  dft1d #(.N_LEN(NC)) dut_c (.clk, .rst_n, .in_valid(vc), .in_data(ic),
                             .out_valid(vco), .out_data(oc));

  typedef struct { cword_t f[]; int t; } vec_t;
  vec_t qa[$], qb[$], qc[$];
  int   done_a = 0, done_b = 0, done_c = 0, back_to_back = 0;

  function automatic cword_t rand_c();
    real r, i;
    r = real'(int'($urandom % 2001) - 1000) / 8.0;
    i = real'(int'($urandom % 2001) - 1000) / 8.0;
    return {from_real(r), from_real(i)};
  endfunction

  function automatic int lat(input int n_len);
    return (n_len % 2 == 0) ? n_len - 1 : n_len;
  endfunction

  task automatic check_vec(input int n_len, input vec_t v, input cword_t got[], input int t_out);
    cword_t g[];
    real fr[], fi[], gr[], gi[];
    real tol, mag;
    dft_algo(n_len, v.f, g);
    fr = new[n_len]; fi = new[n_len];
    mag = 0.0;
    for (int n = 0; n < n_len; n++) begin
      fr[n] = to_real(v.f[n][31:16]);
      fi[n] = to_real(v.f[n][15:0]);
      mag += (fr[n] < 0 ? -fr[n] : fr[n]) + (fi[n] < 0 ? -fi[n] : fi[n]);
    end
    dft_exact(n_len, fr, fi, gr, gi);
    tol = mag * n_len / 1024.0 + 0.01;
    for (int k = 0; k < n_len; k++) begin
      real er, ei;
      checks++;
      if (got[k] !== g[k]) begin
        failures++;
        if (failures < 10) $display("N=%0d F(%0d) = %h, model %h", n_len, k, got[k], g[k]);
      end
      er = to_real(got[k][31:16]) - gr[k];
      ei = to_real(got[k][15:0]) - gi[k];
      checks++;
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        if (failures < 10) $display("N=%0d F(%0d) off the exact DFT by %f,%f", n_len, k, er, ei);
      end
    end
    checks++;
    if (t_out - v.t != lat(n_len) - 1) begin
      failures++;
      $display("N=%0d latency %0d cycles, expected %0d", n_len, t_out - v.t + 1, lat(n_len));
    end
  endtask

  // output monitors
  always @(posedge clk) begin
    if (rst_n && vao) begin
      cword_t got[];
      got = new[NA];
      for (int k = 0; k < NA; k++) got[k] = oa[k];
      if (qa.size() == 0) begin
        failures++;
        $display("N=%0d unexpected output", NA);
      end else check_vec(NA, qa.pop_front(), got, cycle - 1);
      done_a++;
    end
    if (rst_n && vbo) begin
      cword_t got[];
      got = new[NB];
      for (int k = 0; k < NB; k++) got[k] = ob[k];
      if (qb.size() == 0) begin
        failures++;
        $display("N=%0d unexpected output", NB);
      end else check_vec(NB, qb.pop_front(), got, cycle - 1);
      done_b++;
    end
    if (rst_n && vco) begin
      cword_t got[];
      got = new[NC];
      for (int k = 0; k < NC; k++) got[k] = oc[k];
      if (qc.size() == 0) begin
        failures++;
        $display("N=%0d unexpected output", NC);
      end else check_vec(NC, qc.pop_front(), got, cycle - 1);
      done_c++;
    end
  end

  initial begin
    va = 0; vb = 0; vc = 0;
    for (int n = 0; n < NC; n++) ic[n] = '0;
    for (int n = 0; n < NA; n++) ia[n] = '0;
    for (int n = 0; n < NB; n++) ib[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NVEC; i++) begin
      vec_t v;
      @(negedge clk);
      // idle cycles now and then, long runs of back-to-back vectors otherwise
      va = ($urandom % 8 != 0);
      vb = va;
      vc = va;
      if (va) begin
        v.f = new[NA];
        v.t = cycle;
        for (int n = 0; n < NA; n++) begin v.f[n] = rand_c(); ia[n] = v.f[n]; end
        qa.push_back(v);
        v.f = new[NB];
        for (int n = 0; n < NB; n++) begin v.f[n] = rand_c(); ib[n] = v.f[n]; end
        qb.push_back(v);
        v.f = new[NC];
        for (int n = 0; n < NC; n++) begin v.f[n] = rand_c(); ic[n] = v.f[n]; end
        qc.push_back(v);
        back_to_back++;
      end
    end
    @(negedge clk);
    va = 0; vb = 0; vc = 0;
    repeat (NB + 5) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0 || qc.size() != 0 || done_a == 0 ||
        done_a != done_b || done_a != done_c) begin
      failures++;
      $display("outputs missing: %0d / %0d left", qa.size(), qb.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
