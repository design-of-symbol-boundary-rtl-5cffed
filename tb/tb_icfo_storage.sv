// tb_icfo_storage: a stream of candidate samples, some captured, then one
// second-half sample.  The two largest sums of the captured first-half
// energies plus the second-half energies, and their hypotheses, are
// compared with a reference computed in the testbench.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_icfo_storage;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, res_valid = 0, res_last = 0, capture = 0, acc = 0;
  logic [2:0] res_hyp = 0;
  logic [21:0] res_mag = 0;
  logic done;
  logic [22:0] max1, max2;
  logic [2:0] hyp1, hyp2;
  int checks = 0, failures = 0;

  icfo_storage dut (.*);
  always #5 clk = !clk;

  task automatic send_sample(int m [7], bit second, bit cap);
    for (int h = 0; h < 7; h++) begin
      @(negedge clk);
      capture = 0;
      res_valid = 1; res_hyp = 3'(h); res_mag = 22'(m[h]); res_last = (h == 6); acc = second;
    end
    @(negedge clk);
    res_valid = 0; res_last = 0; acc = 0; capture = cap;
    @(negedge clk) capture = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int first [7];
      int m [7];
      int second [7];
      int sum [7];
      int b1, b2;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      // several samples; the one with index pick is captured last
      for (int s = 0; s < 5; s++) begin
        for (int h = 0; h < 7; h++) m[h] = $urandom_range(0, 2000000);
        if (s == 3) first = m;
        send_sample(m, 0, (s == 1) || (s == 3));
      end
      for (int h = 0; h < 7; h++) second[h] = $urandom_range(0, 2000000);
      send_sample(second, 1, 0);
      repeat (2) @(negedge clk);
      b1 = 0;
      for (int h = 0; h < 7; h++) begin
        sum[h] = first[h] + second[h];
        if (sum[h] > sum[b1]) b1 = h;
      end
      b2 = (b1 == 0) ? 1 : 0;
      for (int h = 0; h < 7; h++) if (h != b1 && sum[h] > sum[b2]) b2 = h;
      checks++;
      if (max1 != 23'(sum[b1]) || hyp1 != 3'(b1) || max2 != 23'(sum[b2]) || hyp2 != 3'(b2)) begin
        failures++;
        $display("FAIL t=%0d got %0d/%0d %0d/%0d expected %0d/%0d %0d/%0d", t, max1, hyp1,
                 max2, hyp2, sum[b1], b1, sum[b2], b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
