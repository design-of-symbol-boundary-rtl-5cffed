// corr_delay_line: shift register of L quantised sample codes with a running
// count of the taps that hold the value 0.
//
// Each shift moves a new code into tap 0 (tap j then holds the sample that
// arrived j shifts earlier).  The zero counter starts at L after reset (all
// taps cleared) and is updated with +1 when a zero enters and -1 when a zero
// leaves the last tap, so it never needs to look at all taps.  This counter
// is what makes the unsigned correlation of corr_unit possible.
// Timing: taps and zeros change on the clock edge where shift is high.
//
// The two-bit taps and the zero counter that starts at 300 and is updated
// from the first and last tap follow the reference architecture; the sample
// encoding is this design's own.
module corr_delay_line
  import sync_pkg::*;
#(
  parameter int unsigned L  = CORR_LEN,
  parameter int unsigned CW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  qsym_t         din,
  output qsym_t         taps  [L],
  output logic [CW-1:0] zeros
);

  logic in_zero, out_zero;
  assign in_zero  = !(din.pos || din.neg);
  assign out_zero = !(taps[L-1].pos || taps[L-1].neg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L; j++) taps[j] <= qzero();
      zeros <= CW'(L);
    end else if (shift) begin
      taps[0] <= din;
      for (int j = 1; j < L; j++) taps[j] <= taps[j-1];
      zeros <= zeros + CW'(in_zero) - CW'(out_zero);
    end
  end

endmodule
