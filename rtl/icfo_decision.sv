// icfo_decision: ping-pong choice of the integer carrier frequency offset.
//
// The frequency axis is split by the fractional CFO estimate eps (a fraction
// of a subcarrier spacing, coded as a binary angle: eps = fcfo / 2^AW):
//   strong region, |eps| < 1/4: the CFO is close to one integer, the
//     hypothesis with the largest correlation sum (hyp1) is taken;
//   weak region, |eps| >= 1/4: the CFO lies between two integers and both
//     neighbours give similar peaks.  If the two largest sums belong to
//     adjacent hypotheses, the lower one is taken when eps > 0 and the upper
//     one when eps < 0, so that ICFO + eps lands between them.
// When the two peaks are not adjacent, the weak-region rule falls back to
// hyp1 (this fallback is the design's own choice).  Hypothesis h means an
// ICFO of h - (NH-1)/2.  Output registered one cycle after valid.
module icfo_decision
  import sync_pkg::*;
#(
  parameter int unsigned NH = N_HYP,
  parameter int unsigned HW = $clog2(NH),
  parameter int unsigned AW = ANGLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic [HW-1:0]        hyp1,
  input  logic [HW-1:0]        hyp2,
  input  logic signed [AW-1:0] fcfo,
  output logic                 out_valid,
  output logic signed [HW:0]   icfo,
  output logic                 weak_rgn,       // weak region was used
  output logic                 swapped     // the second peak was chosen
);

  localparam int QUARTER = 1 << (AW - 2);

  logic        weak_c, adjacent, take2;
  logic [HW-1:0] lo, hi, pick;

  always_comb begin
    weak_c   = (fcfo >= AW'(QUARTER)) || (fcfo <= -AW'(QUARTER));
    lo       = (hyp1 < hyp2) ? hyp1 : hyp2;
    hi       = (hyp1 < hyp2) ? hyp2 : hyp1;
    adjacent = (hi - lo) == HW'(1);
    pick     = hyp1;
    if (weak_c && adjacent) pick = (fcfo > 0) ? lo : hi;
    take2    = (pick != hyp1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      icfo      <= '0;
      weak_rgn      <= 1'b0;
      swapped   <= 1'b0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        icfo    <= $signed({1'b0, pick}) - $signed((HW+1)'((NH - 1) / 2));
        weak_rgn    <= weak_c;
        swapped <= take2;
      end
    end
  end

endmodule
