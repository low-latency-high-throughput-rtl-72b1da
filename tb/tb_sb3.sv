// tb_sb3: checks that sb3 forms F(k) = f0 + (F1-F2) + j(F3+F4) and
// F(N-k) = f0 + (F1+F2) + j(F3-F4) in the documented order of operations,
// registered one cycle after its inputs, and forwards f(0).
module tb_sb3;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  acc4_t  acc_in;
  cfp16_t f0_in, fk_out, fnk_out, f0_out, e_fk, e_fnk;
  logic [15:0] rc, ic;
  int     checks = 0, failures = 0;

  sb3 dut (.*);

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
      if (failures < 10) $display("sb3 %s mismatch: %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    acc_in = '0; f0_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      acc_in = {rand_fp(5, 25), rand_fp(5, 25), rand_fp(5, 25), rand_fp(5, 25)};
      f0_in  = {rand_fp(5, 25), rand_fp(5, 25)};
      rc = ref_add(f0_in.re, acc_in.f1, 0);
      ic = ref_add(f0_in.im, acc_in.f3, 0);
      e_fk.re  = ref_add(rc, acc_in.f2, 1);
      e_fk.im  = ref_add(ic, acc_in.f4, 0);
      e_fnk.re = ref_add(rc, acc_in.f2, 0);
      e_fnk.im = ref_add(ic, acc_in.f4, 1);
      @(posedge clk);
      #1;
      cmp("F(k)", fk_out, e_fk);
      cmp("F(N-k)", fnk_out, e_fnk);
      cmp("f0", f0_out, f0_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
