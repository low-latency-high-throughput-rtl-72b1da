// tb_fp16_add: checks fp16_add against the double-precision reference model on
// directed cases (cancellation, ties, zeros, overflow) and random operands.
module tb_fp16_add;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  fp16_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp16_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb, input logic ts);
    logic [15:0] exp_y;
    a = ta; b = tb; sub = ts;
    #1;
    exp_y = ref_add(ta, tb, ts);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("fp16_add mismatch: %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb, y, exp_y);
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
    check(16'h3c00, 16'h3c00, 0);   // 1 + 1
    check(16'h3c00, 16'h3c00, 1);   // 1 - 1
    check(16'h3c00, 16'h3c01, 1);   // cancellation
    check(16'h6400, 16'h1400, 0);   // far apart
    check(16'h3c00, 16'h1001, 1);   // 1 - tiny
    check(16'h3c00, 16'h0000, 0);   // zero operand
    check(16'h0000, 16'h3c00, 1);
    check(16'h7bff, 16'h7bff, 0);   // overflow
    check(16'h6800, 16'h1c00, 0);   // tie region
    for (int i = 0; i < 20000; i++)
      check(rand_fp(1, 29), rand_fp(1, 29), 1'($urandom));
    for (int i = 0; i < 20000; i++)
      check(rand_fp(10, 14), rand_fp(10, 14), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
