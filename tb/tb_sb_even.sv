// tb_sb_even: checks the even-length summing block for N = 6 and N = 8 (the
// sign of f(N/2) in F(N/2) differs between them): F(0) = (f0 + fh) + s,
// F(N/2) = (f0 +- fh) + a, and the forwarded f0 + fh and f0 - fh, all
// registered one cycle after the inputs.
module tb_sb_even;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  cfp16_t f0_in, fh_in, s_in, a_in;
  cfp16_t dc6, half6, gp6, gm6, dc8, half8, gp8, gm8;
  cfp16_t e_gp, e_gm, e_dc, e_h6, e_h8;
  int     checks = 0, failures = 0;

  sb_even #(.N_LEN(6)) dut6 (.clk, .rst_n, .f0_in, .fh_in, .s_in, .a_in,
                             .dc_out(dc6), .half_out(half6), .gp_out(gp6), .gm_out(gm6));
  sb_even #(.N_LEN(8)) dut8 (.clk, .rst_n, .f0_in, .fh_in, .s_in, .a_in,
                             .dc_out(dc8), .half_out(half8), .gp_out(gp8), .gm_out(gm8));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input cfp16_t got, input cfp16_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("sb_even %s mismatch: %h expected %h", what, got, exp_v);
    end
  endtask

  function automatic cfp16_t cadd(input cfp16_t a, input cfp16_t b, input logic sub);
    return {ref_add(a.re, b.re, sub), ref_add(a.im, b.im, sub)};
  endfunction

  initial begin
    f0_in = '0; fh_in = '0; s_in = '0; a_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      f0_in = {rand_fp(5, 25), rand_fp(5, 25)};
      fh_in = {rand_fp(5, 25), rand_fp(5, 25)};
      s_in  = {rand_fp(5, 25), rand_fp(5, 25)};
      a_in  = {rand_fp(5, 25), rand_fp(5, 25)};
      e_gp = cadd(f0_in, fh_in, 0);
      e_gm = cadd(f0_in, fh_in, 1);
      e_dc = cadd(e_gp, s_in, 0);
      e_h6 = cadd(e_gm, a_in, 0);   // N/2 = 3 is odd
      e_h8 = cadd(e_gp, a_in, 0);   // N/2 = 4 is even
      @(posedge clk);
      #1;
      cmp("dc6", dc6, e_dc);   cmp("dc8", dc8, e_dc);
      cmp("half6", half6, e_h6); cmp("half8", half8, e_h8);
      cmp("gp", gp6, e_gp);    cmp("gm", gm6, e_gm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
