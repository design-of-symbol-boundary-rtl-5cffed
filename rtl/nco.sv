// nco: numerically controlled oscillator for CFO compensation.
//
// A phase accumulator of WF bits adds the signed frequency word on every
// sample (ce); its top WA bits go to a rotation-mode CORDIC that turns the
// vector (A/K, 0) by that phase, giving cos and sin with amplitude
// A = 2^(WFG-1) - 1 without any table.  The CORDIC carries GB = 4 guard
// bits, dropped with rounding at the output.  The word lengths follow the rule
// WA > WFG + 1 + log2(pi) for the truncated phase (16 > 12 + 2.65 here).
// With WF = 16 + log2(N) a frequency word f means f / 2^16 subcarrier
// spacings, so a CFO estimate in the 16-bit angle format can be used as the
// word directly.
// Timing: the CORDIC advances with ce, so cos/sin on a given sample belong
// to the phase of ITER+1 samples earlier (a constant phase offset).
// clear resets the phase to 0.
//
// The phase accumulator feeding a sine/cosine generator through a truncated
// phase follows the reference NCO; a CORDIC as the generator instead of a
// table, the widths and the guard bits are this design's own.
module nco
  import sync_pkg::*;
#(
  parameter int unsigned WF   = ANGLE_W + $clog2(N_FFT),
  parameter int unsigned WA   = ANGLE_W,
  parameter int unsigned WFG  = 12,
  parameter int unsigned ITER = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  clear,
  input  logic signed [WF-1:0]  freq,
  output logic signed [WFG-1:0] cos_o,
  output logic signed [WFG-1:0] sin_o
);

  localparam int unsigned GB  = 4;     // guard bits inside the CORDIC
  localparam int unsigned AMP = (1 << (WFG - 1)) - 1;
  localparam int unsigned X0  = ((AMP << GB) * CORDIC_INV_GAIN_Q16 + 32768) >> 16;

  logic [WF-1:0] phase;
  logic signed [WFG+GB+1:0] xo, yo;
  logic signed [WA-1:0]  zo;
  logic                  vo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= '0;
    else if (clear)  phase <= '0;
    else if (ce)     phase <= phase + WF'(freq);
  end

  cordic #(.W(WFG + GB), .ZW(WA), .ITER(ITER), .VECTORING(1'b0)) u_fg (
    .clk, .rst_n, .ce, .in_valid(1'b1),
    .x_in((WFG + GB)'(X0)), .y_in('0), .z_in(phase[WF-1 -: WA]),
    .out_valid(vo), .x_out(xo), .y_out(yo), .z_out(zo));

  // drop the guard bits with rounding, limit to +-AMP
  function automatic logic signed [WFG-1:0] sat(logic signed [WFG+GB+1:0] v);
    logic signed [WFG+GB+1:0] r;
    r = (v + (WFG+GB+2)'(1 << (GB - 1))) >>> GB;
    if (r >  $signed((WFG+GB+2)'(AMP))) return WFG'(AMP);
    if (r < -$signed((WFG+GB+2)'(AMP))) return -WFG'(AMP);
    return WFG'(r);
  endfunction

  assign cos_o = sat(xo);
  assign sin_o = sat(yo);

endmodule
