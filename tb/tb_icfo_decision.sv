// tb_icfo_decision: all pairs of peak hypotheses against FCFO values in
// the strong and weak regions of both signs, compared with the ping-pong
// rule written independently (choose the peak that puts ICFO + FCFO between
// the two adjacent peaks).
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_icfo_decision;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [2:0] hyp1 = 0, hyp2 = 0;
  logic signed [15:0] fcfo = 0;
  logic out_valid;
  logic signed [3:0] icfo;
  logic weak_rgn, swapped;
  int checks = 0, failures = 0;

  icfo_decision dut (.*);
  always #5 clk = !clk;

  initial begin
    int fl [8] = '{0, 5000, 16383, 16384, 30000, -16384, -16385, -32768};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (fl[fi])
      for (int a = 0; a < 7; a++)
        for (int b = 0; b < 7; b++) if (a != b) begin
          automatic real e = real'(fl[fi]) / 65536.0;
          automatic int exp_h = a;
          automatic bit w = (e >= 0.25) || (e <= -0.25);
          if (w && (a - b == 1 || b - a == 1)) begin
            // candidate totals a-3+e and b-3+e: keep the one inside [lo, hi]
            automatic int lo = (a < b) ? a : b;
            automatic real ta = (a - 3) + e;
            exp_h = (ta >= lo - 3 && ta <= lo - 2) ? a : b;
          end
          @(negedge clk);
          valid = 1; hyp1 = 3'(a); hyp2 = 3'(b); fcfo = 16'(fl[fi]);
          @(negedge clk) valid = 0;
          checks++;
          if (!out_valid || int'(icfo) != exp_h - 3 || weak_rgn != w || swapped != (exp_h != a)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d e=%f icfo %0d expected %0d", a, b, e, icfo, exp_h - 3);
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
