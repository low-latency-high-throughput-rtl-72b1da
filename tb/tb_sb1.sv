// tb_sb1: drives sb1 with random complex inputs every cycle and checks the
// registered x, y and running-sum outputs one cycle later against the
// reference model. A second instance with the even-length alternating sum
// enabled (subtracting, as for odd n) checks a_out = a_in - x(n) as well;
// the first must hold a_out at zero.
module tb_sb1;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  cfp16_t f_a, f_b, s_in, x_out, y_out, s_out, a_in, a_out;
  cfp16_t x2, y2, s2, a2;
  cfp16_t e_x, e_y, e_s, e_a;
  int     checks = 0, failures = 0;

  sb1 dut (.*);
  sb1 #(.ALT(1'b1), .ALT_SUB(1'b1)) dut_alt (
    .clk, .rst_n, .f_a, .f_b, .s_in, .x_out(x2), .y_out(y2), .s_out(s2), .a_in, .a_out(a2));

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
      if (failures < 10) $display("sb1 %s mismatch: %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    f_a = '0; f_b = '0; s_in = '0; a_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      f_a  = {rand_fp(5, 25), rand_fp(5, 25)};
      f_b  = {rand_fp(5, 25), rand_fp(5, 25)};
      s_in = {rand_fp(5, 25), rand_fp(5, 25)};
      a_in = {rand_fp(5, 25), rand_fp(5, 25)};
      e_x.re = ref_add(f_a.re, f_b.re, 0);  e_x.im = ref_add(f_a.im, f_b.im, 0);
      e_y.re = ref_add(f_a.re, f_b.re, 1);  e_y.im = ref_add(f_a.im, f_b.im, 1);
      e_s.re = ref_add(s_in.re, e_x.re, 0); e_s.im = ref_add(s_in.im, e_x.im, 0);
      e_a.re = ref_add(a_in.re, e_x.re, 1); e_a.im = ref_add(a_in.im, e_x.im, 1);
      @(posedge clk);
      #1;
      cmp("x", x_out, e_x);
      cmp("y", y_out, e_y);
      cmp("s", s_out, e_s);
      cmp("a zero", a_out, '0);
      cmp("x alt", x2, e_x);
      cmp("s alt", s2, e_s);
      cmp("a alt", a2, e_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
