// tb_wman_sync_top: end-to-end test of the synchronisation subsystem at its
// default sizes (1024-point symbol, 1/8 CP, 300-tap correlator, 7 ICFO
// hypotheses, 200 search positions).
//
// For each frame the testbench builds a preamble symbol: BPSK values from a
// pseudo-random sequence on every third subcarrier of the used band, a
// direct inverse DFT to the time domain and a cyclic prefix.  The frame is
// random data, the preamble starting DLY samples after start, then more
// data; the whole stream is rotated by a carrier frequency offset of CFO
// subcarrier spacings and by a carrier phase that advances by 0.9 rad
// from frame to frame, lightly noised and rounded to 10 bits.  Frames
// with DLY 0 and 199 put the preamble at the first and the last search
// position.  The
// quantised, frequency-shifted preamble coefficients are loaded first.
// Checks per frame: boundary equals DLY (+-1), ICFO + FCFO equals the CFO
// (within 0.03 and with the right integer), the NCO word is -(estimate),
// the ICFO phase rotation over the compensated tail is small, and the
// search, capture, second accumulation, CP window, weak and strong region
// decisions and a ping-pong peak swap each happened at least once.
// Finally six symbols of FFT pilots with a sampling clock offset of 25 ppm
// are sent; the SCO estimate must appear for the fifth and sixth symbol and
// be within 5% of the offset.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_wman_sync_top;
  import sync_pkg::*;

  localparam int N  = N_FFT;
  localparam int CP = CP_LEN;
  localparam int L  = CORR_LEN;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic signed [9:0] in_re = 0, in_im = 0;
  logic [8:0] q_thresh = 9'd45;   // about half the rms of a component
  logic coef_we = 0, coef_half = 0, coef_c = 0, coef_d = 0;
  logic [2:0] coef_hyp = 0;
  logic [8:0] coef_idx = 0;
  logic out_valid;
  logic signed [9:0] out_re, out_im;
  sync_state_e state;
  logic boundary_valid, cfo_valid, weak_region, peak_swapped;
  logic [11:0] boundary;
  logic [2:0] coarse_hyp;
  logic signed [3:0] icfo;
  logic signed [15:0] fcfo;
  logic signed [25:0] nco_freq;
  logic pilot_valid = 0, pilot_right = 0, pilot_last = 0;
  logic signed [9:0] pilot_re = 0, pilot_im = 0;
  logic [6:0] pilot_slot = 0;
  logic sco_valid;
  logic signed [15:0] sco_phase;
  logic signed [31:0] sco_est;

  wman_sync_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_capture = 0, n_acc2 = 0, n_cpwin = 0, n_weak = 0, n_strong = 0;
  int n_swap = 0, n_search = 0;
  longint cycles = 0;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (dut.new_max) n_capture++;
    if (dut.res_valid && dut.res_half) n_acc2++;
    if (dut.s_valid && dut.fcfo_enable) n_cpwin++;
    if (dut.finder_done) n_search++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // deterministic pseudo-random numbers
  int unsigned rs = 32'h1234_5678;
  function automatic real urand();
    rs ^= rs << 13; rs ^= rs >> 17; rs ^= rs << 5;
    return real'(rs) / 4294967296.0;
  endfunction
  function automatic real grand();
    real s = 0;
    for (int i = 0; i < 12; i++) s += urand();
    return s - 6.0;
  endfunction

  real pre_re [N + CP];
  real pre_im [N + CP];

  task automatic make_preamble(int seed);
    real xr, xi, scale, p;
    int unsigned lfsr = 32'hACE1 + seed;
    real xk [N];
    for (int k = 0; k < N; k++) xk[k] = 0.0;
    // used band -426..425, every third carrier, DC empty
    for (int k = -426; k <= 425; k += 3) begin
      lfsr = lfsr * 1103515245 + 12345;
      if (k != 0) xk[(k + N) % N] = lfsr[16] ? 1.0 : -1.0;
    end
    p = 0.0;
    for (int n = 0; n < N; n++) begin
      xr = 0.0; xi = 0.0;
      for (int k = 0; k < N; k++) if (xk[k] != 0.0) begin
        xr += xk[k] * $cos(2.0 * PI * k * n / N);
        xi += xk[k] * $sin(2.0 * PI * k * n / N);
      end
      pre_re[n + CP] = xr; pre_im[n + CP] = xi;
      p += xr * xr + xi * xi;
    end
    scale = 90.0 / $sqrt(p / (2.0 * N));   // about 90 rms per component
    for (int n = CP; n < N + CP; n++) begin
      pre_re[n] *= scale; pre_im[n] *= scale;
    end
    for (int n = 0; n < CP; n++) begin
      pre_re[n] = pre_re[n + N]; pre_im[n] = pre_im[n + N];
    end
  endtask

  task automatic load_coefs();
    real cr, ci, a;
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < N_HYP; i++)
        for (int m = 0; m < L; m++) begin
          int s = h * L + m;
          a  = 2.0 * PI * (i - 3) * s / N;
          cr = pre_re[s] * $cos(a) - pre_im[s] * $sin(a);
          ci = pre_re[s] * $sin(a) + pre_im[s] * $cos(a);
          @(negedge clk);
          coef_we = 1; coef_half = h[0]; coef_hyp = i[2:0]; coef_idx = m[8:0];
          coef_c = (cr < 0.0); coef_d = (ci < 0.0);
        end
    @(negedge clk) coef_we = 0;
  endtask

  function automatic logic signed [9:0] to10(real v);
    real r = $floor(v + 0.5);
    if (r > 511.0) r = 511.0;
    if (r < -512.0) r = -512.0;
    return 10'(int'(r));
  endfunction

  // drive one sample, 7 cycles per sample
  task automatic send(real re, real im);
    @(negedge clk);
    in_re = to10(re); in_im = to10(im); in_valid = 1;
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  real th0 = 0.0;   // carrier phase, advanced by 0.9 rad per frame
  task automatic run_frame(int dly, real cfo, real noise);
    real sr, si, a, est, dph;
    real tr [0:511];
    real ti [0:511];
    real orr [0:511];
    real oi [0:511];
    int n_tail, n_out, gidx;
    real c1r, c1i, c2r, c2i;
    longint t0;
    make_preamble(dly);
    load_coefs();
    th0 += 0.9;
    // a few idle samples, then start
    for (int n = 0; n < 20; n++) send(60.0 * grand(), 60.0 * grand());
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cycles;
    gidx = 0;
    n_tail = 0; n_out = 0;
    for (int n = 0; n < dly + N + CP + 700; n++) begin
      if (n >= dly && n < dly + N + CP) begin
        sr = pre_re[n - dly]; si = pre_im[n - dly];
      end else begin
        sr = 64.0 * grand(); si = 64.0 * grand();
      end
      a = 2.0 * PI * cfo * n / N + th0;
      if (cfo_valid && n_tail < 512 && n >= dly + N + CP + 60) begin
        tr[n_tail] = sr; ti[n_tail] = si; n_tail++;
      end
      send(sr * $cos(a) - si * $sin(a) + noise * grand(),
           sr * $sin(a) + si * $cos(a) + noise * grand());
      // capture the compensated output of that sample
      if (n_tail > 0 && n_out < n_tail) begin
        orr[n_out] = real'(out_re); oi[n_out] = real'(out_im); n_out++;
      end
    end
    $display("frame dly=%0d cfo=%f: boundary=%0d coarse=%0d icfo=%0d fcfo=%f weak=%0d swap=%0d state=%0d cycles=%0d",
             dly, cfo, boundary, int'(coarse_hyp) - 3, icfo, real'(fcfo) / 65536.0,
             weak_region, peak_swapped, state, cycles - t0);
    check(state == ST_TRACK, "reached tracking");
    check(boundary_valid && (int'(boundary) >= dly - 1) && (int'(boundary) <= dly + 1),
          $sformatf("boundary %0d expected %0d", boundary, dly));
    est = real'(icfo) + real'(fcfo) / 65536.0;
    check(cfo_valid && (est - cfo < 0.03) && (cfo - est < 0.03),
          $sformatf("cfo estimate %f expected %f", est, cfo));
    check(nco_freq == -((26'(icfo) <<< 16) + 26'(fcfo)), "nco word");
    if (weak_region) n_weak++; else n_strong++;
    if (peak_swapped) n_swap++;
    // residual rotation: the output lags the sample by one derotator cycle
    // and the NCO phase by a constant, so compare the phase of out*conj(ref)
    // over the first and second half of the tail
    c1r = 0; c1i = 0; c2r = 0; c2i = 0;
    for (int k = 0; k + 1 < n_out; k++) begin
      // out of sample k is read after the send of sample k, aligned
      if (k < n_out / 2) begin
        c1r += orr[k] * tr[k] + oi[k] * ti[k];  c1i += oi[k] * tr[k] - orr[k] * ti[k];
      end else begin
        c2r += orr[k] * tr[k] + oi[k] * ti[k];  c2i += oi[k] * tr[k] - orr[k] * ti[k];
      end
    end
    dph = $atan2(c2i, c2r) - $atan2(c1i, c1r);
    if (dph > PI) dph -= 2.0 * PI;
    if (dph < -PI) dph += 2.0 * PI;
    check(n_out > 100 && dph < 0.15 && dph > -0.15,
          $sformatf("residual rotation %f rad over %0d samples", dph, n_out));
  endtask


  // pilots of NSYM symbols after the FFT with a sampling clock offset t:
  // 120 pilots on k = -417 + 7j, constant pilot values, a flat channel of
  // random phase; the SCO estimate must appear from the fifth symbol on
  int n_sco = 0;
  always @(posedge clk) if (sco_valid) n_sco++;
  task automatic run_pilots(real t, int nsym);
    real ph [120];
    real pv [120];
    real a, got;
    int n0;
    for (int j = 0; j < 120; j++) begin
      ph[j] = 2.0 * PI * urand();
      pv[j] = (urand() < 0.5) ? -150.0 : 150.0;
    end
    for (int l = 0; l < nsym; l++) begin
      n0 = n_sco;
      for (int j = 0; j < 120; j++) begin
        a = ph[j] + 2.0 * PI * (-417 + 7 * j) * t * l * 1.125;
        @(negedge clk);
        pilot_valid = 1; pilot_slot = 7'(j); pilot_right = (j >= 60); pilot_last = (j == 119);
        pilot_re = to10(pv[j] * $cos(a)); pilot_im = to10(pv[j] * $sin(a));
        @(negedge clk) pilot_valid = 0; pilot_last = 0;
        @(negedge clk);
      end
      repeat (30) @(negedge clk);
      if (l >= 4) begin
        got = real'(sco_est) / 1099511627776.0;
        check(n_sco == n0 + 1 && got / t > 0.95 && got / t < 1.05,
              $sformatf("sco estimate %e expected %e", got, t));
      end else begin
        check(n_sco == n0, "no sco estimate before four symbols of history");
      end
    end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    run_frame(100, 2.10, 2.0);
    run_frame(37, 1.42, 2.0);
    run_frame(150, -0.30, 2.0);
    run_frame(5, -2.80, 2.0);
    run_frame(180, 1.49, 2.0);
    run_frame(60, -1.55, 2.0);
    run_frame(30, -1.50, 2.0);   // weak region, |e| = 0.5
    run_frame(70, -1.50, 2.0);
    run_frame(199, 0.90, 2.0);   // last search position
    run_frame(0, -0.10, 2.0);    // first search position
    run_pilots(25.0e-6, 6);
    check(n_sco >= 2, "sampling clock offset estimate happened");
    check(n_search >= 6, "boundary search completed");
    check(n_capture >= 6, "candidate capture happened");
    check(n_acc2 >= 6 * N_HYP, "second-half accumulation happened");
    check(n_cpwin >= 6 * CP, "CP window accumulation happened");
    check(n_weak >= 1, "weak-region decision happened");
    check(n_strong >= 1, "strong-region decision happened");
    check(n_swap >= 1, "ping-pong swap happened");
    $display("mechanisms: search=%0d capture=%0d acc2=%0d cpwin=%0d weak=%0d strong=%0d swap=%0d sco=%0d",
             n_search, n_capture, n_acc2, n_cpwin, n_weak, n_strong, n_swap, n_sco);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
