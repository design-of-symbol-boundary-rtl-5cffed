// tb_sco_estimator: pilots of a 1024-point symbol stream with a sampling
// clock offset.
//
// 120 pilots per symbol on subcarriers k = -417 + 7j (j = slot 0..119;
// slots 0..59 on the negative half), each a +-1 pilot value (the same in
// every symbol) times a fixed channel gain of
// random phase and constant magnitude (so that the angle of a half's sum is
// exactly the angle at its mean subcarrier), rotated by 2 pi k t l (1 + 1/8) for symbol l,
// rounded to 10 bits.  For several offsets t the testbench checks that no
// estimate comes out for the first four symbols, that each later symbol
// gives one estimate a fixed number of cycles after its last pilot, that
// phase_diff equals the angle difference of the two pilot-correlation sums
// computed here from the same rounded pilots (within 5 LSB of 2^-16 turn),
// that sco_est is phase_diff times round(2^24 / (4 * 1.125 * 420)), and that
// sco_est / 2^40 is within 3% of t.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_sco_estimator;
  localparam real PI = 3.14159265358979;
  localparam int NPIL = 120;
  localparam int LAT  = 19;     // cycles from the p_last edge to est_valid

  logic clk = 0, rst_n = 0, clear = 0, p_valid = 0, p_right = 0, p_last = 0;
  logic signed [9:0] p_re = 0, p_im = 0;
  logic [6:0] p_slot = 0;
  logic est_valid;
  logic signed [15:0] phase_diff;
  logic signed [31:0] sco_est;

  sco_estimator dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int unsigned rs = 32'h2468_ace1;
  function automatic real urand();
    rs ^= rs << 13; rs ^= rs >> 17; rs ^= rs << 5;
    return real'(rs) / 4294967296.0;
  endfunction

  real hr [NPIL], hi [NPIL], pil [NPIL];
  int qr [5][NPIL], qi [5][NPIL];   // last five symbols, rounded
  int n_est = 0;
  longint cyc = 0, t_last = 0, t_est = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (est_valid) begin n_est++; t_est = cyc; end
  end

  function automatic int rnd(real v);
    return int'($floor(v + 0.5));
  endfunction

  task automatic run(real t, int nsym);
    real a, pr, pv, s1r, s1i, s2r, s2i, e1, e2, dexp, got;
    int cur, old, n0;
    for (int j = 0; j < NPIL; j++) begin
      a = 2.0 * PI * urand();
      hr[j] = 150.0 * $cos(a);
      hi[j] = 150.0 * $sin(a);
      pil[j] = (urand() < 0.5) ? -1.0 : 1.0;
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int l = 0; l < nsym; l++) begin
      n0 = n_est;
      cur = l % 5;
      for (int j = 0; j < NPIL; j++) begin
        int k = -417 + 7 * j;
        pv = pil[j];
        a  = 2.0 * PI * k * t * l * 1.125;
        pr = pv * (hr[j] * $cos(a) - hi[j] * $sin(a));
        qr[cur][j] = rnd(pr);
        qi[cur][j] = rnd(pv * (hr[j] * $sin(a) + hi[j] * $cos(a)));
        @(negedge clk);
        p_valid = 1; p_slot = 7'(j); p_right = (j >= NPIL / 2); p_last = (j == NPIL - 1);
        p_re = 10'(qr[cur][j]); p_im = 10'(qi[cur][j]);
        @(negedge clk) p_valid = 0; p_last = 0;
        t_last = cyc;
        @(negedge clk);
      end
      repeat (LAT + 5) @(negedge clk);
      if (l < 4) begin
        check(n_est == n0, $sformatf("no estimate in symbol %0d", l));
      end else begin
        check(n_est == n0 + 1 && t_est - t_last == LAT,
              $sformatf("one estimate, latency %0d", t_est - t_last));
        old = (l - 4) % 5;
        s1r = 0; s1i = 0; s2r = 0; s2i = 0;
        for (int j = 0; j < NPIL; j++) begin
          real zr = qr[cur][j] * qr[old][j] + qi[cur][j] * qi[old][j];
          real zi = qi[cur][j] * qr[old][j] - qr[cur][j] * qi[old][j];
          if (j < NPIL / 2) begin s1r += zr; s1i += zi; end
          else begin s2r += zr; s2i += zi; end
        end
        e1 = $atan2(s1i, s1r); e2 = $atan2(s2i, s2r);
        dexp = (e2 - e1) / (2.0 * PI);
        if (dexp > 0.5) dexp -= 1.0;
        if (dexp < -0.5) dexp += 1.0;
        got = real'(phase_diff) / 65536.0;
        check((got - dexp) * 65536.0 < 5.0 && (dexp - got) * 65536.0 < 5.0,
              $sformatf("phase diff %f expected %f", got, dexp));
        check(sco_est == phase_diff * 8877, "estimate scaling");
        got = real'(sco_est) / 1099511627776.0;
        check(got / t > 0.97 && got / t < 1.03, $sformatf("t %e expected %e", got, t));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(20.0e-6, 8);
    run(-35.0e-6, 7);
    run(5.0e-6, 6);
    run(-60.0e-6, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
