// coef_store: the quantised time-domain preamble, pre-shifted by each of the
// N_HYP integer CFO hypotheses, for the two halves of the correlation.
//
// The preamble depends on the cell ID and segment, so the table is written
// through a port rather than fixed.  Entry (half, hyp, m) holds the signs of
// the real part (c) and imaginary part (d) of preamble sample
// half*L + m rotated by exp(j*2*pi*(hyp-3)*(half*L+m)/N), coded 0 for +1 and
// 1 for -1.  Sample m of a half is stored at tap position L-1-m, so that a
// window whose newest sample sits in tap 0 lines up with the preamble.
// Writes take effect at the clock edge; reads are combinational.
//
// Pre-rotated, sign-only coefficients follow the reference design; holding
// them in a writable register array (the reference does not say how they are
// held) is this design's own choice.
module coef_store
  import sync_pkg::*;
#(
  parameter int unsigned L     = CORR_LEN,
  parameter int unsigned NH    = N_HYP,
  parameter int unsigned HW    = $clog2(NH),
  parameter int unsigned IW    = $clog2(L)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          w_half,
  input  logic [HW-1:0] w_hyp,
  input  logic [IW-1:0] w_idx,     // preamble sample index m within the half
  input  logic          w_c,       // sign of Re, 1 = negative
  input  logic          w_d,       // sign of Im, 1 = negative
  input  logic          r_half,
  input  logic [HW-1:0] r_hyp,
  output logic [L-1:0]  c_vec,     // indexed by tap
  output logic [L-1:0]  d_vec
);

  logic [L-1:0] c_mem [2][NH];
  logic [L-1:0] d_mem [2][NH];

  always_ff @(posedge clk) begin
    if (we && (32'(w_hyp) < NH) && (32'(w_idx) < L)) begin
      c_mem[w_half][w_hyp][L-1-32'(w_idx)] <= w_c;
      d_mem[w_half][w_hyp][L-1-32'(w_idx)] <= w_d;
    end
  end

  always_comb begin
    c_vec = '0;
    d_vec = '0;
    if (32'(r_hyp) < NH) begin
      c_vec = c_mem[r_half][r_hyp];
      d_vec = d_mem[r_half][r_hyp];
    end
  end

endmodule
