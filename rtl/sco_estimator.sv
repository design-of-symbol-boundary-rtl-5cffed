// sco_estimator: sampling clock offset (SCO) estimate from the pilot
// subcarriers at the FFT output.
//
// A sampling clock error t = dT/T rotates subcarrier k of symbol l by an
// angle that grows with both k and l.  Correlating each pilot with the same
// pilot four symbols earlier, Z = R(l,k) * conj(R(l-4,k)), leaves
// |H|^2 |P|^2 exp(j 2 pi k t 4 Ts/Tu): the channel and the pilot values drop
// out, and the phase is proportional to k.  The Z of the pilots on the
// negative half of the spectrum (set C1) and of the positive half (C2) are
// summed separately, the two sums go through vectoring CORDICs, and
//     t = (phi2 - phi1) / (2 pi * 4 * (1 + CP/N) * K/2),
// where K/2 is the distance between the centres of the two pilot halves.
//
// Interface: the FFT side presents one pilot per p_valid with its slot
// number p_slot (the same slot must carry the same subcarrier four symbols
// later), p_right = 1 for a positive-frequency pilot, and p_last on the last
// pilot of a symbol.  Pilots must be at least two cycles apart: the history
// is one single-port memory of 4 x 128 words, read in the cycle after
// p_valid and overwritten with the new pilot in the next (read-modify-write,
// bank = symbol number mod 4).  The estimate needs four symbols of history;
// from the fifth symbol on, est_valid pulses ITER+4 cycles after each p_last
// with phase_diff (phi2 - phi1, 2^16 = one turn) and sco_est (t in units of
// 2^-40).  clear restarts the history.
//
// The algorithm, the four-symbol spacing and the split into two halves
// follow the document; that a CORDIC gives the angles, the memory layout,
// the widths and the output scaling are this design's own.  The printed
// formula for t omits the factor 4 of the four-symbol spacing, which the
// derivation before it contains; the factor is included here.
module sco_estimator
  import sync_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,          // pilot component width
  parameter int unsigned NSLOT = 128,               // pilot slots per symbol
  parameter int unsigned N     = N_FFT,
  parameter int unsigned CP    = CP_LEN,
  parameter int unsigned K     = 840,               // used subcarriers
  parameter int unsigned AW    = ANGLE_W,
  parameter int unsigned EW    = 32,                // estimate width
  parameter int unsigned SLW   = $clog2(NSLOT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 p_valid,
  input  logic signed [W-1:0]  p_re,
  input  logic signed [W-1:0]  p_im,
  input  logic [SLW-1:0]       p_slot,
  input  logic                 p_right,
  input  logic                 p_last,
  output logic                 est_valid,
  output logic signed [AW-1:0] phase_diff,
  output logic signed [EW-1:0] sco_est
);

  localparam int unsigned PW    = 2 * W + 2;
  localparam int unsigned ACC_W = PW + SLW;
  localparam int unsigned ITER  = 15;
  // t * 2^40 = phase_diff * 2^24 / (4 (1 + CP/N) K/2)
  localparam int INV_Q = int'(16777216.0 / (4.0 * (1.0 + real'(CP) / real'(N)) * real'(K) / 2.0));
  localparam int unsigned QW = 32;

  logic [1:0]          bank;
  logic [2:0]          seen;        // symbols seen, saturating at 4
  logic                hist;
  logic                v1, right1, last1, hist1;
  logic [SLW+1:0]      addr1;
  logic signed [W-1:0] new_re, new_im;
  logic [2*W-1:0]      old_word;
  logic                p_valid_c, right2, last2, fire;
  logic                    z_valid;
  logic signed [PW-1:0]    z_re, z_im;
  logic signed [ACC_W-1:0] acc1_re, acc1_im, acc2_re, acc2_im;
  logic                    ang1_valid, ang2_valid;
  logic signed [ACC_W+1:0] ax1, ay1, ax2, ay2;
  logic signed [AW-1:0]    z1, z2, dphi;

  assign hist = seen[2];

  // four-symbol history, read then overwritten
  spram #(.DEPTH(4 * NSLOT), .W(2 * W)) u_hist (
    .clk, .en(p_valid || v1), .we(v1),
    .addr(v1 ? addr1 : {bank, p_slot}),
    .wdata({new_re, new_im}), .rdata(old_word));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; right1 <= 1'b0; last1 <= 1'b0; hist1 <= 1'b0; addr1 <= '0;
      new_re <= '0; new_im <= '0; bank <= '0; seen <= '0;
    end else if (clear) begin
      v1 <= 1'b0; right1 <= 1'b0; last1 <= 1'b0; hist1 <= 1'b0;
      bank <= '0; seen <= '0;
    end else begin
      v1 <= p_valid;
      if (p_valid) begin
        addr1  <= {bank, p_slot};
        new_re <= p_re;
        new_im <= p_im;
        right1 <= p_right;
        last1  <= p_last;
        hist1  <= hist;       // history as it was before this pilot
        if (p_last) begin
          bank <= bank + 1'b1;
          if (!hist) seen <= seen + 1'b1;
        end
      end
    end
  end

  a_spacing : assert property (@(posedge clk) disable iff (!rst_n) v1 |-> !p_valid);

  // Z = new * conj(old), only once the memory holds symbol l-4
  assign p_valid_c = v1 && hist1;
  cmult3 #(.W(W)) u_mul (
    .clk, .rst_n, .valid(p_valid_c),
    .a_re(new_re), .a_im(new_im),
    .b_re(old_word[2*W-1:W]), .b_im(old_word[W-1:0]),
    .out_valid(z_valid), .p_re(z_re), .p_im(z_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      right2 <= 1'b0; last2 <= 1'b0; fire <= 1'b0;
      acc1_re <= '0; acc1_im <= '0; acc2_re <= '0; acc2_im <= '0;
    end else if (clear) begin
      right2 <= 1'b0; last2 <= 1'b0; fire <= 1'b0;
      acc1_re <= '0; acc1_im <= '0; acc2_re <= '0; acc2_im <= '0;
    end else begin
      right2 <= p_valid_c && right1;
      last2  <= p_valid_c && last1;
      fire   <= last2;
      if (fire) begin
        // the CORDICs take the sums in this cycle; start the next symbol
        acc1_re <= '0; acc1_im <= '0; acc2_re <= '0; acc2_im <= '0;
      end else if (z_valid) begin
        if (right2) begin
          acc2_re <= acc2_re + ACC_W'(z_re);
          acc2_im <= acc2_im + ACC_W'(z_im);
        end else begin
          acc1_re <= acc1_re + ACC_W'(z_re);
          acc1_im <= acc1_im + ACC_W'(z_im);
        end
      end
    end
  end

  cordic #(.W(ACC_W), .ZW(AW), .ITER(ITER), .VECTORING(1'b1)) u_ang1 (
    .clk, .rst_n, .ce(1'b1), .in_valid(fire),
    .x_in(acc1_re), .y_in(acc1_im), .z_in('0),
    .out_valid(ang1_valid), .x_out(ax1), .y_out(ay1), .z_out(z1));

  cordic #(.W(ACC_W), .ZW(AW), .ITER(ITER), .VECTORING(1'b1)) u_ang2 (
    .clk, .rst_n, .ce(1'b1), .in_valid(fire),
    .x_in(acc2_re), .y_in(acc2_im), .z_in('0),
    .out_valid(ang2_valid), .x_out(ax2), .y_out(ay2), .z_out(z2));

  assign dphi = z2 - z1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid  <= 1'b0;
      phase_diff <= '0;
      sco_est    <= '0;
    end else begin
      est_valid <= ang1_valid && ang2_valid;
      if (ang1_valid && ang2_valid) begin
        phase_diff <= dphi;
        sco_est    <= EW'($signed(QW'(dphi)) * $signed(QW'(INV_Q)));
      end
    end
  end

endmodule
