// corr_bank: quantised complex correlation of the received samples with the
// preamble, for N_HYP integer CFO hypotheses per sample.
//
// Two corr_delay_lines hold the quantised real (A) and imaginary (B) parts
// of the last L samples.  With the preamble coefficient C + jD the product
// (A + jB)(C - jD) gives
//   Re = sum A*C + sum B*D,   Im = sum B*C - sum A*D,
// so four corr_units work on the two delay lines.  The bank runs at N_HYP
// times the sample rate: after each in_valid it spends N_HYP clock cycles,
// one per hypothesis, each with that hypothesis' coefficient vector read
// from coef_store (rd_half / rd_hyp, combinational).  The magnitude passed
// on is the energy Re^2 + Im^2 (two small multipliers; the design's own
// choice: the cheaper |Re| + |Im| varies by up to 41% with the phase of the
// peak, more than the gap between neighbouring ICFO hypotheses).
//
// Timing: the delay lines shift on in_valid; the result for hypothesis k of
// that sample appears k+2 cycles after in_valid, registered, with res_valid.
// res_last marks hypothesis N_HYP-1.  in_valid must be at least N_HYP
// cycles apart.  The half-1 coefficients are used for the sample whose index
// n_in equals half1_n while half1_en is high; res_half tags such results.
module corr_bank
  import sync_pkg::*;
#(
  parameter int unsigned L  = CORR_LEN,
  parameter int unsigned NH = N_HYP,
  parameter int unsigned NW = 12,                 // sample index width
  parameter int unsigned HW = $clog2(NH),
  parameter int unsigned CW = $clog2(L + 1),
  parameter int unsigned UW = CW + 2,             // one corr_unit result
  parameter int unsigned RW = UW + 1,             // Re / Im
  parameter int unsigned MW = 2 * RW - 2          // Re^2 + Im^2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,          // low: bank asleep
  input  logic                 in_valid,
  input  qsym_t                q_re,
  input  qsym_t                q_im,
  input  logic [NW-1:0]        n_in,        // index of this sample
  input  logic                 half1_en,
  input  logic [NW-1:0]        half1_n,
  // coefficient read port
  output logic                 rd_half,
  output logic [HW-1:0]        rd_hyp,
  input  logic [L-1:0]         c_vec,
  input  logic [L-1:0]         d_vec,
  // results
  output logic                 res_valid,
  output logic [HW-1:0]        res_hyp,
  output logic                 res_last,
  output logic                 res_half,
  output logic [NW-1:0]        res_n,
  output logic signed [RW-1:0] res_re,
  output logic signed [RW-1:0] res_im,
  output logic [MW-1:0]        res_mag
);

  qsym_t         taps_a [L];
  qsym_t         taps_b [L];
  logic [CW-1:0] zeros_a, zeros_b;
  logic signed [UW-1:0] s_ac, s_bd, s_bc, s_ad;

  logic          busy;
  logic [HW-1:0] hyp;
  logic          half;
  logic [NW-1:0] n_cur;

  logic shift;
  assign shift = en && in_valid;

  corr_delay_line #(.L(L)) u_dl_a (
    .clk, .rst_n, .shift, .din(q_re), .taps(taps_a), .zeros(zeros_a));
  corr_delay_line #(.L(L)) u_dl_b (
    .clk, .rst_n, .shift, .din(q_im), .taps(taps_b), .zeros(zeros_b));

  corr_unit #(.L(L)) u_ac (.taps(taps_a), .coef(c_vec), .zeros(zeros_a), .result(s_ac));
  corr_unit #(.L(L)) u_bd (.taps(taps_b), .coef(d_vec), .zeros(zeros_b), .result(s_bd));
  corr_unit #(.L(L)) u_bc (.taps(taps_b), .coef(c_vec), .zeros(zeros_b), .result(s_bc));
  corr_unit #(.L(L)) u_ad (.taps(taps_a), .coef(d_vec), .zeros(zeros_a), .result(s_ad));

  assign rd_half = half;
  assign rd_hyp  = hyp;

  logic signed [RW-1:0] re_c, im_c;
  logic [MW-1:0]        mag_c;
  always_comb begin
    re_c  = RW'(s_ac) + RW'(s_bd);
    im_c  = RW'(s_bc) - RW'(s_ad);
    mag_c = MW'(re_c * re_c) + MW'(im_c * im_c);
  end

  // hypothesis sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      hyp   <= '0;
      half  <= 1'b0;
      n_cur <= '0;
    end else if (shift) begin
      busy  <= 1'b1;
      hyp   <= '0;
      half  <= half1_en && (n_in == half1_n);
      n_cur <= n_in;
    end else if (busy) begin
      if (32'(hyp) == NH - 1) busy <= 1'b0;
      else                    hyp  <= hyp + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hyp   <= '0;
      res_last  <= 1'b0;
      res_half  <= 1'b0;
      res_n     <= '0;
      res_re    <= '0;
      res_im    <= '0;
      res_mag   <= '0;
    end else begin
      res_valid <= busy;
      res_last  <= busy && (32'(hyp) == NH - 1);
      if (busy) begin
        res_hyp  <= hyp;
        res_half <= half;
        res_n    <= n_cur;
        res_re   <= re_c;
        res_im   <= im_c;
        res_mag  <= mag_c;
      end
    end
  end

  // The bank needs NH cycles per sample.
  a_rate : assert property (@(posedge clk) disable iff (!rst_n)
    shift |-> (!busy || 32'(hyp) == NH - 1));

endmodule
