// quantizer: maps one complex sample to two 2-bit codes, one per component,
// each meaning -1, 0 or +1.
//
// A component whose magnitude is below THRESH becomes 0, otherwise its sign.
// The three-level quantisation of the received signal is what lets the
// correlator replace multipliers by a few gates; the dead-zone threshold is
// this design's choice (a programmable input, THRESH).  Purely combinational.
module quantizer
  import sync_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  input  logic        [W-2:0] thresh,   // dead zone: |x| < thresh -> 0
  output qsym_t               q_re,
  output qsym_t               q_im
);

  function automatic qsym_t q1(logic signed [W-1:0] x, logic [W-2:0] t);
    logic [W-1:0] mag;
    qsym_t r;
    mag = x[W-1] ? W'(-x) : W'(x);
    r.pos = !x[W-1] && (mag >= {1'b0, t});
    r.neg =  x[W-1] && (mag >= {1'b0, t});
    return r;
  endfunction

  always_comb begin
    q_re = q1(re, thresh);
    q_im = q1(im, thresh);
  end

endmodule
