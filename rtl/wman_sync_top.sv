// wman_sync_top: downlink synchronisation for 802.16e OFDMA (1024-point FFT,
// 1/8 cyclic prefix): symbol boundary detection, integer CFO (ICFO) and
// fractional CFO (FCFO) estimation, and CFO compensation.
//
// Data path: received samples -> derotator (driven by the NCO) -> the
// compensated stream, which feeds
//   * the quantiser and the correlation bank: a 300-tap three-level
//     correlation with the preamble, seven ICFO hypotheses per sample at
//     seven clock cycles per sample; the largest magnitude over 200
//     positions gives the boundary and the coarse ICFO;
//   * the ICFO storage: the seven first-half results of the best position
//     are added to those of the second preamble half, the two largest sums
//     are kept;
//   * the FCFO estimator: CP cross correlation through a twister delay line
//     of two single-port memories, angle by a vectoring CORDIC;
//   * the ping-pong ICFO decision, which uses the FCFO estimate to choose
//     between two adjacent peaks.
// The total CFO estimate loads the NCO so that later samples leave the
// derotator compensated.  Beside this path, the SCO estimator takes the
// pilots of the FFT output (pilot_* ports, the FFT itself is not part of
// this design) and reports the sampling clock offset.
//
// Clocking: one clock, the fast clock of the correlation bank.  in_valid
// marks a received sample and must be at least 7 cycles apart (the bank
// tries one hypothesis per cycle); a second, slower clock domain for the
// sample rate is replaced by this enable.
// Control: pulse start at the beginning of the frame's preamble search;
// state reaches ST_TRACK when the estimates are in.  The preamble
// coefficients are written through the coef_* port beforehand.
module wman_sync_top
  import sync_pkg::*;
#(
  parameter int unsigned W    = SAMPLE_W,
  parameter int unsigned N    = N_FFT,
  parameter int unsigned CP   = CP_LEN,
  parameter int unsigned L    = CORR_LEN,
  parameter int unsigned NH   = N_HYP,
  parameter int unsigned SRCH = SEARCH_LEN,
  parameter int unsigned AW   = ANGLE_W,
  parameter int unsigned NW   = 12,
  parameter int unsigned HW   = $clog2(NH),
  parameter int unsigned IW   = $clog2(L),
  parameter int unsigned WF   = AW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  input  logic [W-2:0]         q_thresh,
  // preamble coefficient table
  input  logic                 coef_we,
  input  logic                 coef_half,
  input  logic [HW-1:0]        coef_hyp,
  input  logic [IW-1:0]        coef_idx,
  input  logic                 coef_c,
  input  logic                 coef_d,
  // compensated samples
  output logic                 out_valid,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  // estimates and status
  output sync_state_e          state,
  output logic                 boundary_valid,
  output logic [NW-1:0]        boundary,      // sample index of the CP start
  output logic [HW-1:0]        coarse_hyp,    // hypothesis of the search peak
  output logic                 cfo_valid,
  output logic signed [HW:0]   icfo,
  output logic signed [AW-1:0] fcfo,          // fraction of a subcarrier, /2^AW
  output logic                 weak_region,
  output logic                 peak_swapped,
  output logic signed [WF-1:0] nco_freq,
  // pilots from the FFT (not part of this design) for the SCO estimate
  input  logic                 pilot_valid,
  input  logic signed [W-1:0]  pilot_re,
  input  logic signed [W-1:0]  pilot_im,
  input  logic [6:0]           pilot_slot,
  input  logic                 pilot_right,   // positive-frequency pilot
  input  logic                 pilot_last,    // last pilot of a symbol
  output logic                 sco_valid,
  output logic signed [AW-1:0] sco_phase,     // phi2 - phi1, /2^AW turns
  output logic signed [31:0]   sco_est        // sampling offset dT/T, /2^40
);

  localparam int unsigned CB_W  = $clog2(L + 1);
  localparam int unsigned RW    = CB_W + 3;          // bank Re/Im width
  localparam int unsigned MW    = 2 * RW - 2;
  localparam int unsigned ACC_W = 2 * W + 2 + $clog2(CP);

  // derotator and NCO
  logic signed [11:0] nco_cos, nco_sin;
  logic               s_valid;
  logic signed [W-1:0] s_re, s_im;

  nco #(.WF(WF), .WA(AW), .WFG(12)) u_nco (
    .clk, .rst_n, .ce(in_valid), .clear(1'b0), .freq(nco_freq),
    .cos_o(nco_cos), .sin_o(nco_sin));

  derotator #(.W(W), .CW(12)) u_derot (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .cos_i(nco_cos), .sin_i(nco_sin),
    .out_valid(s_valid), .out_re(s_re), .out_im(s_im));

  assign out_valid = s_valid;
  assign out_re    = s_re;
  assign out_im    = s_im;

  // controller
  logic          clear, bank_en, half1_en, dl_en, fcfo_enable;
  logic          angle_start, decide_start;
  logic [NW-1:0] n_cnt, half1_n;
  logic          finder_done, new_max, storage_done;
  logic [NW-1:0] best_n;
  logic [MW-1:0] best_mag;
  logic          ang_valid, dec_valid;

  sync_ctrl #(.L(L), .N(N), .CP(CP), .NW(NW)) u_ctrl (
    .clk, .rst_n, .start, .s_valid,
    .finder_done, .best_n, .storage_done,
    .angle_done(ang_valid), .decide_done(dec_valid),
    .state, .n_cnt, .clear, .bank_en, .half1_en, .half1_n, .dl_en,
    .fcfo_enable, .angle_start, .decide_start, .boundary_valid, .boundary);

  // symbol boundary detection and coarse ICFO
  qsym_t q_re, q_im;
  quantizer #(.W(W)) u_quant (
    .re(s_re), .im(s_im), .thresh(q_thresh), .q_re, .q_im);

  logic          rd_half;
  logic [HW-1:0] rd_hyp;
  logic [L-1:0]  c_vec, d_vec;

  coef_store #(.L(L), .NH(NH)) u_coef (
    .clk, .we(coef_we), .w_half(coef_half), .w_hyp(coef_hyp), .w_idx(coef_idx),
    .w_c(coef_c), .w_d(coef_d), .r_half(rd_half), .r_hyp(rd_hyp),
    .c_vec, .d_vec);

  logic                   res_valid, res_last, res_half;
  logic [HW-1:0]          res_hyp;
  logic [NW-1:0]          res_n;
  logic signed [RW-1:0]   res_re, res_im;
  logic [MW-1:0]          res_mag;

  corr_bank #(.L(L), .NH(NH), .NW(NW)) u_bank (
    .clk, .rst_n, .en(bank_en), .in_valid(s_valid), .q_re, .q_im,
    .n_in(n_cnt), .half1_en, .half1_n,
    .rd_half, .rd_hyp, .c_vec, .d_vec,
    .res_valid, .res_hyp, .res_last, .res_half, .res_n,
    .res_re, .res_im, .res_mag);

  boundary_finder #(.NW(NW), .HW(HW), .MW(MW), .FIRST_N(L - 1), .NPOS(SRCH)) u_find (
    .clk, .rst_n, .clear, .res_valid, .res_hyp, .res_last, .res_n, .res_mag,
    .new_max, .done(finder_done), .best_n, .best_hyp(coarse_hyp), .best_mag);

  logic [MW:0]   max1, max2;
  logic [HW-1:0] hyp1, hyp2;

  icfo_storage #(.NH(NH), .MW(MW)) u_store (
    .clk, .rst_n, .clear, .res_valid, .res_hyp, .res_last, .res_mag,
    .capture(new_max), .acc(res_half),
    .done(storage_done), .max1, .hyp1, .max2, .hyp2);

  // fractional CFO
  logic signed [ACC_W-1:0] acc_re, acc_im;
  logic signed [ACC_W+1:0] ang_x, ang_y;
  logic signed [AW-1:0]    ang_z;

  fcfo_estimator #(.W(W), .N(N), .CP(CP)) u_fcfo (
    .clk, .rst_n, .clear, .in_valid(s_valid && dl_en), .in_re(s_re), .in_im(s_im),
    .fcfo_enable, .acc_re, .acc_im);

  cordic #(.W(ACC_W), .ZW(AW), .ITER(15), .VECTORING(1'b1)) u_angle (
    .clk, .rst_n, .ce(1'b1), .in_valid(angle_start),
    .x_in(acc_re), .y_in(acc_im), .z_in('0),
    .out_valid(ang_valid), .x_out(ang_x), .y_out(ang_y), .z_out(ang_z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         fcfo <= '0;
    else if (ang_valid) fcfo <= ang_z;
  end

  // ping-pong ICFO decision and NCO word
  icfo_decision #(.NH(NH), .AW(AW)) u_dec (
    .clk, .rst_n, .valid(decide_start), .hyp1, .hyp2, .fcfo,
    .out_valid(dec_valid), .icfo, .weak_rgn(weak_region), .swapped(peak_swapped));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nco_freq  <= '0;
      cfo_valid <= 1'b0;
    end else if (start) begin
      nco_freq  <= '0;
      cfo_valid <= 1'b0;
    end else if (dec_valid) begin
      nco_freq  <= -((WF'(icfo) <<< AW) + WF'(fcfo));
      cfo_valid <= 1'b1;
    end
  end

  // sampling clock offset from the FFT pilots; its loop filter and the
  // interpolator it would steer are outside this design
  sco_estimator #(.W(W), .N(N), .CP(CP), .AW(AW)) u_sco (
    .clk, .rst_n, .clear(start),
    .p_valid(pilot_valid), .p_re(pilot_re), .p_im(pilot_im), .p_slot(pilot_slot),
    .p_right(pilot_right), .p_last(pilot_last),
    .est_valid(sco_valid), .phase_diff(sco_phase), .sco_est);

endmodule
