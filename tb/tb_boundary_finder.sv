// tb_boundary_finder: streams of 7 results per sample with random energies
// and a planted peak.  Checks the peak position and hypothesis, that
// results outside the search window are ignored, that new_max pulses once
// after each sample that raised the maximum, and that done pulses after the
// last of the 200 positions.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_boundary_finder;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, res_valid = 0, res_last = 0;
  logic [2:0] res_hyp = 0;
  logic [11:0] res_n = 0;
  logic [21:0] res_mag = 0;
  logic new_max, done;
  logic [11:0] best_n;
  logic [2:0] best_hyp;
  logic [21:0] best_mag;
  int checks = 0, failures = 0;
  int n_new = 0, n_done = 0, exp_new = 0;

  boundary_finder dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) begin
    if (new_max) n_new++;
    if (done) n_done++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int peak_n, int peak_h, int big_outside);
    int runmax = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    n_new = 0; n_done = 0; exp_new = 0;
    for (int n = 0; n < 560; n++) begin
      automatic bit raised = 0;
      for (int h = 0; h < 7; h++) begin
        automatic int m = $urandom_range(0, 1000 + n * 20);
        if (n == peak_n && h == peak_h) m = 500000;
        if (big_outside && (n == 100 || n == 520)) m = 900000;
        @(negedge clk);
        res_valid = 1; res_hyp = 3'(h); res_n = 12'(n); res_mag = 22'(m); res_last = (h == 6);
        if (n >= 299 && n < 499 && m > runmax) begin runmax = m; raised = 1; end
      end
      if (raised) exp_new++;
      @(negedge clk) res_valid = 0; res_last = 0;
    end
    repeat (3) @(negedge clk);
    check(best_n == 12'(peak_n) && best_hyp == 3'(peak_h) && best_mag == 22'd500000,
          $sformatf("peak at %0d/%0d got %0d/%0d", peak_n, peak_h, best_n, best_hyp));
    check(n_new == exp_new, $sformatf("new_max pulses %0d expected %0d", n_new, exp_new));
    check(n_done == 1, $sformatf("done pulses %0d", n_done));
  endtask

  // done must come right after the last result of position 498
  always @(negedge clk) if (done) begin
    checks++;
    if (res_n != 12'd498 && res_n != 12'd499) begin failures++; $display("FAIL done timing"); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(350, 4, 0);
    run(299, 0, 1);
    run(498, 6, 1);
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
