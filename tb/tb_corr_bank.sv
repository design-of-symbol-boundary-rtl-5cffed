// tb_corr_bank: random quantised samples every 7 cycles into the 300-tap
// bank, with a random coefficient table modelled in the testbench.  Each of
// the 7 results per sample is compared with Re/Im/energy computed directly
// from the sample history; the result for hypothesis k must appear k+2
// cycles after in_valid, and the half-1 table must be used for exactly the
// sample named by half1_n.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_corr_bank;
  import sync_pkg::*;
  localparam int L = CORR_LEN;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, half1_en = 0;
  qsym_t q_re, q_im;
  logic [11:0] n_in = 0, half1_n = 0;
  logic rd_half;
  logic [2:0] rd_hyp;
  logic [L-1:0] c_vec, d_vec;
  logic res_valid, res_last, res_half;
  logic [2:0] res_hyp;
  logic [11:0] res_n;
  logic signed [11:0] res_re, res_im;
  logic [21:0] res_mag;
  int checks = 0, failures = 0;

  corr_bank dut (.*);
  always #5 clk = !clk;

  logic [L-1:0] tc [2][7];
  logic [L-1:0] td [2][7];
  assign c_vec = tc[rd_half][rd_hyp];
  assign d_vec = td[rd_half][rd_hyp];

  int ha [600];   // quantised history by sample index
  int hb [600];
  int tv [600];   // cycle of in_valid by sample index
  int cyc = 0, n_half_seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int qv(qsym_t q);
    return q.pos ? 1 : (q.neg ? -1 : 0);
  endfunction
  function automatic qsym_t rq();
    int r = $urandom_range(0, 4);
    return (r < 2) ? '{neg: 1'b0, pos: 1'b1} : (r < 4) ? '{neg: 1'b1, pos: 1'b0}
                                               : '{neg: 1'b0, pos: 1'b0};
  endfunction

  // checker
  always @(negedge clk) if (rst_n && res_valid) begin
    automatic int re = 0, im = 0, h = int'(res_half);
    for (int j = 0; j < L; j++) begin
      automatic int c = tc[h][res_hyp][j] ? -1 : 1;
      automatic int d = td[h][res_hyp][j] ? -1 : 1;
      automatic int k = int'(res_n) - j;
      if (k >= 0) begin
        re += ha[k] * c + hb[k] * d;
        im += hb[k] * c - ha[k] * d;
      end
    end
    checks++;
    if (int'(res_re) != re || int'(res_im) != im || int'(res_mag) != re * re + im * im
        || cyc - tv[res_n] != int'(res_hyp) + 2 || res_last != (res_hyp == 6)
        || res_half != (res_n == 12'd400)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d hyp=%0d re %0d/%0d im %0d/%0d lat %0d half %0d", res_n, res_hyp,
                 res_re, re, res_im, im, cyc - tv[res_n], res_half);
    end
    if (res_half) n_half_seen++;
  end

  initial begin
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < L; j++) begin
          tc[h][i][j] = 1'($urandom_range(0, 1));
          td[h][i][j] = 1'($urandom_range(0, 1));
        end
    q_re = '{neg: 1'b0, pos: 1'b0}; q_im = q_re;
    repeat (3) @(negedge clk);
    rst_n = 1;
    half1_en = 1; half1_n = 12'd400;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      q_re = rq(); q_im = rq();
      if (n < 100 && n % 10 == 0) q_re = '{neg: 1'b0, pos: 1'b0};
      n_in = 12'(n); in_valid = 1;
      @(posedge clk);
      // update the history at the shift, as the delay lines do
      #1;
      ha[n] = qv(q_re); hb[n] = qv(q_im);
      tv[n] = cyc - 1;
      @(negedge clk) in_valid = 0;
      repeat (5 + ((n % 3 == 0) ? 2 : 0)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_half_seen != 7) begin
      failures++;
      $display("FAIL half-1 results %0d", n_half_seen);
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
