// tb_sb2: checks that sb2 registers f(0) + sum as the DC output and forwards
// f(0), one cycle after its inputs.
module tb_sb2;
  import dft_pkg::*;
  import fp16_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  cfp16_t f0_in, s_in, dc_out, f0_out, e_dc, e_f0;
  int     checks = 0, failures = 0;

  sb2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f0_in = '0; s_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      f0_in = {rand_fp(5, 25), rand_fp(5, 25)};
      s_in  = {rand_fp(5, 25), rand_fp(5, 25)};
      e_dc.re = ref_add(f0_in.re, s_in.re, 0);
      e_dc.im = ref_add(f0_in.im, s_in.im, 0);
      e_f0 = f0_in;
      @(posedge clk);
      #1;
      checks += 2;
      if (dc_out !== e_dc) begin
        failures++;
        if (failures < 10) $display("sb2 dc mismatch: %h expected %h", dc_out, e_dc);
      end
      if (f0_out !== e_f0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
