// tb_pc: checks processing cell (k=2, n=3) of a 7-point array. The expected
// coefficient is computed here with $cos/$sin and rounded by the reference
// model; each of the four products and partial sums is checked one cycle
// after the inputs, and x, y must pass down unchanged. It also checks the
// elaboration-time coefficient generator dft_pkg::twiddle against $cos/$sin
// for every odd N from 3 to 257 (this covers N = 5 and 101 of the
// architecture's tables) and every exponent p < N.
module tb_pc;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  localparam int NL = 7, KK = 2, NN = 3;

  logic   clk = 0, rst_n = 0;
  cfp16_t x_in, y_in, x_out, y_out;
  acc4_t  acc_in, acc_out, e_acc;
  logic [15:0] wre, wim;
  int     checks = 0, failures = 0;

  pc #(.N_LEN(NL), .K(KK), .NIDX(NN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int nl = 3; nl <= 257; nl += 2)
      for (int p = 0; p < nl; p++) begin
        cfp16_t w;
        w = twiddle(nl, p);
        checks++;
        if (w.re !== from_real($cos(2.0 * 3.14159265358979323846 * p / nl)) ||
            w.im !== from_real(-$sin(2.0 * 3.14159265358979323846 * p / nl))) begin
          failures++;
          if (failures < 10) $display("twiddle(%0d, %0d) = %h", nl, p, w);
        end
      end
    wre = from_real($cos(2.0 * 3.14159265358979323846 * KK * NN / NL));
    wim = from_real(-$sin(2.0 * 3.14159265358979323846 * KK * NN / NL));
    x_in = '0; y_in = '0; acc_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x_in   = {rand_fp(5, 25), rand_fp(5, 25)};
      y_in   = {rand_fp(5, 25), rand_fp(5, 25)};
      acc_in = {rand_fp(5, 25), rand_fp(5, 25), rand_fp(5, 25), rand_fp(5, 25)};
      if (i % 4 == 0) acc_in = '0;   // first column of the array
      e_acc.f1 = ref_add(acc_in.f1, ref_mul(x_in.re, wre), 0);
      e_acc.f2 = ref_add(acc_in.f2, ref_mul(y_in.im, wim), 0);
      e_acc.f3 = ref_add(acc_in.f3, ref_mul(x_in.im, wre), 0);
      e_acc.f4 = ref_add(acc_in.f4, ref_mul(y_in.re, wim), 0);
      @(posedge clk);
      #1;
      checks += 3;
      if (acc_out !== e_acc) begin
        failures++;
        if (failures < 10) $display("pc mismatch: %h expected %h", acc_out, e_acc);
      end
      if (x_out !== x_in) failures++;
      if (y_out !== y_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
