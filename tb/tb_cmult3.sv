// tb_cmult3: random and extreme 10-bit operands; the three-multiplier
// product must equal a * conj(b) computed with four multiplications.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_cmult3;
  logic clk = 0, rst_n = 0, valid = 0;
  logic signed [9:0] a_re = 0, a_im = 0, b_re = 0, b_im = 0;
  logic out_valid;
  logic signed [21:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmult3 dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int ar, ai, br, bi;
      if (t < 16) begin
        ar = t[0] ? -512 : 511; ai = t[1] ? -512 : 511; br = t[2] ? -512 : 511; bi = t[3] ? -512 : 511;
      end else begin
        ar = $urandom_range(0, 1023) - 512; ai = $urandom_range(0, 1023) - 512;
        br = $urandom_range(0, 1023) - 512; bi = $urandom_range(0, 1023) - 512;
      end
      @(negedge clk);
      valid = 1; a_re = 10'(ar); a_im = 10'(ai); b_re = 10'(br); b_im = 10'(bi);
      @(negedge clk) valid = 0;
      checks++;
      if (!out_valid || int'(p_re) != ar * br + ai * bi || int'(p_im) != ai * br - ar * bi) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d %0d %0d -> %0d %0d", ar, ai, br, bi, p_re, p_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
