// derotator: removes the carrier frequency offset by rotating each sample by
// the NCO angle theta:
//   Re out = Re * cos(theta) - Im * sin(theta)
//   Im out = Re * sin(theta) + Im * cos(theta)
// with four multipliers and two adders.  cos/sin are signed CW-bit values of
// amplitude 2^(CW-1) - 1; products are rounded back to W bits and saturated.
// Timing: out appears one cycle after in_valid, with out_valid.
//
// The four-multiplier structure is the reference design's; rounding,
// saturation and the output register are this design's own.
module derotator
  import sync_pkg::*;
#(
  parameter int unsigned W  = SAMPLE_W,
  parameter int unsigned CW = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic signed [CW-1:0] cos_i,
  input  logic signed [CW-1:0] sin_i,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned PW = W + CW + 1;
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(1 << (W - 1));

  logic signed [PW-1:0] re_p, im_p;

  function automatic logic signed [W-1:0] rnd_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(1 << (CW - 2))) >>> (CW - 1);
    if (r > MAXV) return W'(MAXV);
    if (r < MINV) return W'(MINV);
    return W'(r);
  endfunction

  always_comb begin
    re_p = PW'(in_re * cos_i) - PW'(in_im * sin_i);
    im_p = PW'(in_re * sin_i) + PW'(in_im * cos_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_re <= rnd_sat(re_p);
        out_im <= rnd_sat(im_p);
      end
    end
  end

endmodule
