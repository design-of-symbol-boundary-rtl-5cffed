// fcfo_estimator: cyclic-prefix cross correlation for the fractional CFO,
//   P = sum over the CP window of r(n) * conj(r(n - N)),
// whose angle is 2*pi*eps for a CFO of eps subcarrier spacings.
//
// A twister_delay of N samples supplies r(n - N).  While fcfo_enable is low
// a multiplexer feeds 0 instead of the sample into the three-multiplier
// complex product, so a single accumulator register integrates only the
// window that the controller marks (one register instead of one per CP
// sample).  clear empties the accumulator.
// Timing: a sample presented with in_valid and fcfo_enable is in acc_re /
// acc_im two cycles later.  The delay line runs on every in_valid.
//
// The gated multiplier input and the single accumulator register instead of
// 128 registers follow the reference design; widths and the clear input are
// this design's own.
module fcfo_estimator
  import sync_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned N     = N_FFT,
  parameter int unsigned CP    = CP_LEN,
  parameter int unsigned PW    = 2 * W + 2,
  parameter int unsigned ACC_W = PW + $clog2(CP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     in_re,
  input  logic signed [W-1:0]     in_im,
  input  logic                    fcfo_enable,
  output logic signed [ACC_W-1:0] acc_re,
  output logic signed [ACC_W-1:0] acc_im
);

  logic [2*W-1:0]        dl_out;
  logic signed [W-1:0]   d_re, d_im, m_re, m_im;
  logic                  p_valid;
  logic signed [PW-1:0]  p_re, p_im;

  twister_delay #(.DELAY(N), .W(2 * W)) u_delay (
    .clk, .rst_n, .en(in_valid), .din({in_re, in_im}), .dout(dl_out));

  assign d_re = dl_out[2*W-1:W];
  assign d_im = dl_out[W-1:0];
  assign m_re = fcfo_enable ? in_re : '0;
  assign m_im = fcfo_enable ? in_im : '0;

  cmult3 #(.W(W), .PW(PW)) u_mult (
    .clk, .rst_n, .valid(in_valid),
    .a_re(m_re), .a_im(m_im), .b_re(d_re), .b_im(d_im),
    .out_valid(p_valid), .p_re, .p_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (clear) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (p_valid) begin
      acc_re <= acc_re + ACC_W'(p_re);
      acc_im <= acc_im + ACC_W'(p_im);
    end
  end

endmodule
