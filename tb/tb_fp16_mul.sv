// tb_fp16_mul: checks fp16_mul against the double-precision reference model on
// directed cases and random operands.
module tb_fp16_mul;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  fp16_t a, b, y;
  int    checks = 0, failures = 0;

  fp16_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb);
    logic [15:0] exp_y;
    a = ta; b = tb;
    #1;
    exp_y = ref_mul(ta, tb);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("fp16_mul mismatch: %h * %h = %h, expected %h", ta, tb, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3c00, 16'h3c00);   // 1 * 1
    check(16'h4000, 16'hc200);   // 2 * -3
    check(16'h3bff, 16'h3bff);   // rounding
    check(16'h7bff, 16'h4000);   // overflow
    check(16'h0400, 16'h0400);   // underflow
    check(16'h0000, 16'h4000);   // zero
    for (int i = 0; i < 40000; i++)
      check(rand_fp(1, 30), rand_fp(1, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
