// tb_derotator: random samples and unit-amplitude angles; the output must
// be the sample rotated by the angle, rounded back to 10 bits and saturated,
// as computed in the testbench with integer arithmetic.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_derotator;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [9:0] in_re = 0, in_im = 0, out_re, out_im;
  logic signed [11:0] cos_i = 0, sin_i = 0;
  logic out_valid;
  int checks = 0, failures = 0;

  derotator dut (.*);
  always #5 clk = !clk;

  function automatic int rs(longint v);
    longint r = (v + 1024) >>> 11;
    if (r > 511) r = 511;
    if (r < -512) r = -512;
    return int'(r);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic int xr = $urandom_range(0, 1023) - 512;
      automatic int xi = $urandom_range(0, 1023) - 512;
      automatic real a = real'($urandom_range(0, 9999)) / 10000.0 * 2.0 * PI;
      automatic int c = int'($floor(2047.0 * $cos(a) + 0.5));
      automatic int s = int'($floor(2047.0 * $sin(a) + 0.5));
      automatic int er, ei;
      if (t < 4) begin c = (t == 0) ? 2047 : (t == 1) ? -2047 : 0; s = (t == 2) ? 2047 : (t == 3) ? -2047 : 0; end
      @(negedge clk);
      in_valid = 1; in_re = 10'(xr); in_im = 10'(xi); cos_i = 12'(c); sin_i = 12'(s);
      @(negedge clk) in_valid = 0;
      er = rs(longint'(xr) * c - longint'(xi) * s);
      ei = rs(longint'(xr) * s + longint'(xi) * c);
      checks++;
      if (!out_valid || int'(out_re) != er || int'(out_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d c=%0d s=%0d got %0d %0d expected %0d %0d",
                                    xr, xi, c, s, out_re, out_im, er, ei);
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
