// tb_wman_multipath: the synchronisation subsystem at its default sizes on a
// two-transmit-antenna multipath channel.
//
// Antenna 1 sends the preamble the receiver knows (carrier set 0), antenna 2
// a different preamble on carrier set 1 at half the power, as the second
// antenna of a space-time coded downlink does.  Each antenna reaches the
// receiver over six static paths with the relative powers of the ITU
// Vehicular A profile (0, -1, -9, -10, -15, -20 dB), random phases and
// excess delays drawn from 0..50 samples.  On top come the carrier
// frequency offset and noise, and the sum is rounded to 10 bits.
// Checks per frame: the boundary lands on one of antenna 1's paths (between
// the first and the last path delay, +-1), the integer CFO is right and the
// total CFO estimate is within 0.05 subcarrier, the NCO word matches, and
// the residual rotation after correction is small.  Both the weak and the
// strong region must occur; ping-pong swaps are counted and reported.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_wman_multipath;
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

  real pre2_re [N + CP];
  real pre2_im [N + CP];

  task automatic make_preamble(int seed, int cset);
    real xr, xi, scale, p;
    int unsigned lfsr = 32'hACE1 + seed;
    real xk [N];
    for (int k = 0; k < N; k++) xk[k] = 0.0;
    // used band -426..425, every third carrier, DC empty
    for (int k = -426 + cset; k <= 425; k += 3) begin
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

  localparam int NP = 6;
  localparam real VEH_A_DB [NP] = '{0.0, -1.0, -9.0, -10.0, -15.0, -20.0};
  localparam int T = 2400;
  real tx1r [T], tx1i [T], tx2r [T], tx2i [T], rxr [T], rxi [T];
  int dmax, dmin;

  task automatic run_frame(int dly, real cfo, real noise);
    real sr, si, a, est, dph, amp, ph, gr, gi, ptot;
    real tr [0:511];
    real ti [0:511];
    real orr [0:511];
    real oi [0:511];
    int n_tail, n_out, nlen, d;
    real c1r, c1i, c2r, c2i;
    longint t0;
    make_preamble(dly + 7, 1);
    for (int n = 0; n < N + CP; n++) begin pre2_re[n] = pre_re[n]; pre2_im[n] = pre_im[n]; end
    make_preamble(dly, 0);
    load_coefs();
    nlen = dly + N + CP + 700;
    for (int n = 0; n < T; n++) begin
      if (n >= dly && n < dly + N + CP) begin
        tx1r[n] = pre_re[n - dly];  tx1i[n] = pre_im[n - dly];
        tx2r[n] = pre2_re[n - dly] * 0.7071; tx2i[n] = pre2_im[n - dly] * 0.7071;
      end else begin
        tx1r[n] = 64.0 * grand(); tx1i[n] = 64.0 * grand();
        tx2r[n] = 45.0 * grand(); tx2i[n] = 45.0 * grand();
      end
      rxr[n] = 0.0; rxi[n] = 0.0;
    end
    ptot = 0.0;
    for (int p = 0; p < NP; p++) ptot += 10.0 ** (VEH_A_DB[p] / 10.0);
    dmin = 1000; dmax = 0;
    for (int ant = 0; ant < 2; ant++)
      for (int p = 0; p < NP; p++) begin
        d   = (p == 0) ? 0 : int'($floor(urand() * 50.999));
        amp = $sqrt(10.0 ** (VEH_A_DB[p] / 10.0) / ptot);
        ph  = 2.0 * PI * urand();
        gr  = amp * $cos(ph); gi = amp * $sin(ph);
        if (ant == 0) begin
          if (d < dmin) dmin = d;
          if (d > dmax) dmax = d;
        end
        for (int n = d; n < T; n++) begin
          sr = ant == 0 ? tx1r[n - d] : tx2r[n - d];
          si = ant == 0 ? tx1i[n - d] : tx2i[n - d];
          rxr[n] += gr * sr - gi * si;
          rxi[n] += gr * si + gi * sr;
        end
      end
    for (int n = 0; n < 20; n++) send(60.0 * grand(), 60.0 * grand());
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = cycles;
    n_tail = 0; n_out = 0;
    for (int n = 0; n < nlen; n++) begin
      sr = rxr[n]; si = rxi[n];
      a = 2.0 * PI * cfo * n / N;
      if (cfo_valid && n_tail < 512 && n >= dly + N + CP + 60) begin
        tr[n_tail] = sr; ti[n_tail] = si; n_tail++;
      end
      send(sr * $cos(a) - si * $sin(a) + noise * grand(),
           sr * $sin(a) + si * $cos(a) + noise * grand());
      if (n_tail > 0 && n_out < n_tail) begin
        orr[n_out] = real'(out_re); oi[n_out] = real'(out_im); n_out++;
      end
    end
    $display("frame dly=%0d paths %0d..%0d cfo=%f: boundary=%0d coarse=%0d icfo=%0d fcfo=%f weak=%0d swap=%0d state=%0d cycles=%0d",
             dly, dly + dmin, dly + dmax, cfo, boundary, int'(coarse_hyp) - 3, icfo, real'(fcfo) / 65536.0,
             weak_region, peak_swapped, state, cycles - t0);
    check(state == ST_TRACK, "reached tracking");
    check(boundary_valid && (int'(boundary) >= dly + dmin - 1) && (int'(boundary) <= dly + dmax + 1),
          $sformatf("boundary %0d expected %0d..%0d", boundary, dly + dmin, dly + dmax));
    est = real'(icfo) + real'(fcfo) / 65536.0;
    check(cfo_valid && (est - cfo < 0.05) && (cfo - est < 0.05),
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

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    run_frame(80, 1.30, 3.0);
    run_frame(20, -2.20, 3.0);
    run_frame(140, 0.45, 3.0);
    run_frame(60, -1.60, 3.0);
    check(n_search >= 4, "boundary search completed");
    check(n_capture >= 4, "candidate capture happened");
    check(n_acc2 >= 4 * N_HYP, "second-half accumulation happened");
    check(n_cpwin >= 4 * CP, "CP window accumulation happened");
    check(n_weak >= 1, "weak-region decision happened");
    check(n_strong >= 1, "strong-region decision happened");
    $display("mechanisms: search=%0d capture=%0d acc2=%0d cpwin=%0d weak=%0d strong=%0d swap=%0d",
             n_search, n_capture, n_acc2, n_cpwin, n_weak, n_strong, n_swap);
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
