// cmult3: complex product p = a * conj(b) with three real multipliers.
//
// With a = A + jB and b = C + jD:
//   Re p = AC + BD
//   Im p = (A + B)(C - D) - AC + BD
// which shares AC and BD between both parts, trading the fourth multiplier
// for two adders and a subtractor.  Registered: p appears one cycle after
// valid, with out_valid.
//
// The three-multiplier form (A+B)(C-D) - AC + BD is the reference design's;
// the widths and the single output register are this design's own.
module cmult3 #(
  parameter int unsigned W  = 10,
  parameter int unsigned PW = 2 * W + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic signed [W-1:0]  a_re,
  input  logic signed [W-1:0]  a_im,
  input  logic signed [W-1:0]  b_re,
  input  logic signed [W-1:0]  b_im,
  output logic                 out_valid,
  output logic signed [PW-1:0] p_re,
  output logic signed [PW-1:0] p_im
);

  logic signed [2*W-1:0] ac, bd;
  logic signed [W:0]     apb, cmd;
  logic signed [2*W+1:0] prod_x;

  always_comb begin
    ac    = a_re * b_re;
    bd    = a_im * b_im;
    apb   = (W+1)'(a_re) + (W+1)'(a_im);
    cmd   = (W+1)'(b_re) - (W+1)'(b_im);
    prod_x = (2*W+2)'(apb) * (2*W+2)'(cmd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        p_re <= PW'(ac) + PW'(bd);
        p_im <= PW'(prod_x) - PW'(ac) + PW'(bd);
      end
    end
  end

endmodule
