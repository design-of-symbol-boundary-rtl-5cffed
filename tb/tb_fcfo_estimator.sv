// tb_fcfo_estimator: random samples every 7 cycles; fcfo_enable marks a
// 128-sample window starting at sample 1500.  The accumulator must equal
// sum r(n) * conj(r(n-1024)) over the window, computed in the testbench, and
// must not move outside the window; it is checked after every sample from
// the first full delay on, and after a clear.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_fcfo_estimator;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, fcfo_enable = 0;
  logic signed [9:0] in_re = 0, in_im = 0;
  logic signed [28:0] acc_re, acc_im;
  int hr [3000];
  int hi [3000];
  longint er = 0, ei = 0;
  int checks = 0, failures = 0;

  fcfo_estimator dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int n = 0; n < 1800; n++) begin
      @(negedge clk);
      hr[n] = $urandom_range(0, 1023) - 512; hi[n] = $urandom_range(0, 1023) - 512;
      in_re = 10'(hr[n]); in_im = 10'(hi[n]); in_valid = 1;
      fcfo_enable = (n >= 1500 && n < 1628);
      if (fcfo_enable) begin
        er += hr[n] * hr[n - 1024] + hi[n] * hi[n - 1024];
        ei += hi[n] * hr[n - 1024] - hr[n] * hi[n - 1024];
      end
      @(negedge clk) in_valid = 0; fcfo_enable = 0;
      repeat (5) @(negedge clk);
      if (n >= 1030) begin
        checks++;
        if (longint'(acc_re) != er || longint'(acc_im) != ei) begin
          failures++;
          $display("FAIL n=%0d acc %0d %0d expected %0d %0d", n, acc_re, acc_im, er, ei);
        end
      end
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    if (acc_re != 0 || acc_im != 0) begin
      failures++;
      $display("FAIL clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
