// tb_int2fp: checks int2fp on extreme and on random 16-bit integers against
// the reference rounding; the imaginary output must always be zero.
module tb_int2fp;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  logic signed [15:0] din;
  cfp16_t             dout;
  int                 checks = 0, failures = 0;

  int2fp dut (.din(din), .dout(dout));

  task automatic check(input logic signed [15:0] v);
    logic [15:0] exp_re;
    din = v;
    #1;
    exp_re = from_real(real'(v));
    checks++;
    if (dout.re !== exp_re || dout.im !== 16'h0000) begin
      failures++;
      if (failures < 10) $display("int2fp mismatch: %0d -> %h/%h, expected %h", v, dout.re, dout.im, exp_re);
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
    check(16'sd0); check(16'sd1); check(-16'sd1); check(16'sd2049); check(16'sd2051);
    check(16'sd32767); check(-16'sd32768); check(16'sd4097);
    for (int i = 0; i < 20000; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
