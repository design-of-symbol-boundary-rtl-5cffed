// corr_unit: one real part of the quantised correlation,
//   S = sum_j a_j * c_j,  a_j in {-1,0,+1} (taps),  c_j in {+1,-1} (coef),
// computed without signed arithmetic.
//
// Coefficients are coded 0 for +1 and 1 for -1.  Per tap a match bit is set
// when the sample is non-zero and agrees in sign with the coefficient
// (pos AND NOT c, OR neg AND c).  With M n_match and Z zero taps the number
// of disagreeing taps is L - Z - M, so S = 2*M + Z - L: only the match bits
// have to be summed (an adder tree, built here as a balanced sum), and the
// signed step is one final subtraction of the constant L.
// Purely combinational.
//
// Counting matches and adding the zero count and the constant once at the
// end follows the reference architecture (9-bit counts, result
// 2*matches + zeros - 300); the 11-bit signed result width is this design's own.
module corr_unit
  import sync_pkg::*;
#(
  parameter int unsigned L  = CORR_LEN,
  parameter int unsigned CW = $clog2(L + 1),
  parameter int unsigned RW = CW + 2          // signed result width
) (
  input  qsym_t                taps [L],
  input  logic [L-1:0]         coef,    // 1 = coefficient -1
  input  logic [CW-1:0]        zeros,
  output logic signed [RW-1:0] result
);

  logic [L-1:0]  match;
  logic [CW-1:0] n_match;

  always_comb begin
    for (int j = 0; j < L; j++)
      match[j] = (taps[j].pos && !coef[j]) || (taps[j].neg && coef[j]);
  end

  // Sum of L single-bit terms.
  always_comb begin
    n_match = '0;
    for (int j = 0; j < L; j++) n_match = n_match + CW'(match[j]);
  end

  assign result = $signed({1'b0, n_match, 1'b0}) + $signed({2'b00, zeros})
                - $signed(RW'(L));

endmodule
