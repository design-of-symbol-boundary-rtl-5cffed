// cordic: unrolled, pipelined CORDIC with one adder/subtractor stage per
// iteration and the angle constants wired into each stage.
//
// Iteration i:  x' = x - d*y*2^-i,  y' = y + d*x*2^-i,  z' = z - d*atan(2^-i)
//   rotation mode  (VECTORING = 0): d = sign(z), drives z to 0, so the output
//                  vector is (x, y) rotated by z, times the gain K ~ 1.6468;
//   vectoring mode (VECTORING = 1): d = -sign(y), drives y to 0, so z_out =
//                  z_in + atan2(y, x) and x_out = K * |(x, y)|.
// Angles are binary: 2^ZW is one full turn, so z wraps naturally.  A first
// stage folds the input into the right half plane (rotation by pi) so that
// the full circle is covered.  Stages advance when ce is high; latency is
// ITER + 1 enabled cycles; valid travels with the data.
//
// The unrolled structure with hardwired angle constants follows the reference
// design; the pipeline registers, the quadrant fold, the binary-angle format
// and the iteration counts are this design's own.
module cordic
  import sync_pkg::*;
#(
  parameter int unsigned W         = 16,         // input x / y width
  parameter int unsigned ZW        = ANGLE_W,    // angle width
  parameter int unsigned ITER      = 14,         // iterations (at most 24)
  parameter bit          VECTORING = 1'b0,
  parameter int unsigned XW        = W + 2       // internal / output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic                 out_valid,
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic signed [ZW-1:0] z_out
);

  function automatic logic [ZW-1:0] atan_const(int unsigned i);
    logic [32:0] r;
    if (i >= 24) return '0;
    r = {1'b0, ATAN_TURN32[i]} + (33'd1 << (31 - ZW));
    return ZW'(r >> (32 - ZW));
  endfunction

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];

  // stage 0: quadrant fold
  logic fold;
  always_comb begin
    if (VECTORING) fold = x_in[W-1];
    else           fold = z_in[ZW-1] ^ z_in[ZW-2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else if (ce) begin
      vs[0] <= in_valid;
      xs[0] <= fold ? -XW'(x_in) : XW'(x_in);
      ys[0] <= fold ? -XW'(y_in) : XW'(y_in);
      // adding or removing half a turn is the same modulo 2^ZW
      zs[0] <= fold ? (z_in ^ {1'b1, {(ZW-1){1'b0}}}) : z_in;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    logic d_pos;  // d = +1
    assign d_pos = VECTORING ? ys[i][XW-1] : !zs[i][ZW-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else if (ce) begin
        vs[i+1] <= vs[i];
        if (d_pos) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_const(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_const(i);
        end
      end
    end
  end

  assign x_out     = xs[ITER];
  assign y_out     = ys[ITER];
  assign z_out     = zs[ITER];
  assign out_valid = vs[ITER];

endmodule
