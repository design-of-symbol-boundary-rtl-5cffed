// tb_nco: several frequency words, positive and negative.  After the k-th
// enabled cycle the outputs must be 2047*cos / 2047*sin of the phase
// (k-15)*f / 2^26 turns (truncated to 16 bits), within a few LSB.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_nco;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, ce = 0, clear = 0;
  logic signed [25:0] freq = 0;
  logic signed [11:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  nco dut (.*);
  always #5 clk = !clk;

  initial begin
    int fl [5] = '{65536 * 2 + 6554, -65536 * 3 + 100, 32000, -1, 1234567};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (fl[fi]) begin
      @(negedge clk);
      freq = 26'(fl[fi]); clear = 1;
      @(negedge clk) clear = 0;
      for (int k = 1; k <= 400; k++) begin
        @(negedge clk) ce = 1;
        @(negedge clk) ce = 0;
        if (k >= 15 + 15) begin
          automatic longint ph = (longint'(k - 15) * longint'(fl[fi])) & 64'h3FF_FFFF;
          automatic real a = real'(ph >> 10) / 65536.0 * 2.0 * PI;
          automatic real ec = 2047.0 * $cos(a);
          automatic real es = 2047.0 * $sin(a);
          checks++;
          if (real'(cos_o) - ec > 5.0 || ec - real'(cos_o) > 5.0 ||
              real'(sin_o) - es > 5.0 || es - real'(sin_o) > 5.0) begin
            failures++;
            if (failures < 10) $display("FAIL f=%0d k=%0d got %0d %0d expected %f %f",
                                        fl[fi], k, cos_o, sin_o, ec, es);
          end
        end
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
