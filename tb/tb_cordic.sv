// tb_cordic: a vectoring instance (29-bit inputs, 15 iterations, as used for
// the CP correlation angle) and a rotation instance (12-bit, 14 iterations,
// as used in the NCO).  Angles are compared with $atan2, rotated vectors with
// K*(x cos z - y sin z, x sin z + y cos z); the latency must be ITER+1.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_cordic;
  localparam real PI = 3.14159265358979;
  localparam real K  = 1.646760258;
  logic clk = 0, rst_n = 0;
  logic v_in = 0, r_in = 0;
  logic signed [28:0] vx = 0, vy = 0;
  logic signed [11:0] rx = 0, ry = 0;
  logic signed [15:0] rz = 0;
  logic v_out, r_out;
  logic signed [30:0] vxo, vyo;
  logic signed [15:0] vzo;
  logic signed [13:0] rxo, ryo;
  logic signed [15:0] rzo;
  int checks = 0, failures = 0;

  cordic #(.W(29), .ITER(15), .VECTORING(1'b1)) u_vec (
    .clk, .rst_n, .ce(1'b1), .in_valid(v_in), .x_in(vx), .y_in(vy), .z_in(16'sd0),
    .out_valid(v_out), .x_out(vxo), .y_out(vyo), .z_out(vzo));
  cordic #(.W(12), .ITER(14), .VECTORING(1'b0)) u_rot (
    .clk, .rst_n, .ce(1'b1), .in_valid(r_in), .x_in(rx), .y_in(ry), .z_in(rz),
    .out_valid(r_out), .x_out(rxo), .y_out(ryo), .z_out(rzo));

  always #5 clk = !clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      real x, y, z, ez, ex, ey, dz;
      int lat;
      x = (real'($urandom_range(0, 200000)) - 100000.0) * 1000.0;
      y = (real'($urandom_range(0, 200000)) - 100000.0) * 1000.0;
      if (t == 0) begin x = -1.0e8; y = 1.0; end
      if (t == 1) begin x = 0.0; y = -1.0e8; end
      z = real'($urandom_range(0, 65535)) - 32768.0;
      @(negedge clk);
      v_in = 1; vx = 29'(longint'(x)); vy = 29'(longint'(y));
      r_in = 1; rx = 12'sd1000; ry = 12'(int'(y / 1.0e8 * 1000.0)); rz = 16'(int'(z));
      @(negedge clk);
      v_in = 0; r_in = 0;
      lat = 1;
      while (!v_out && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 16) begin failures++; $display("FAIL latency %0d", lat); end
      ez = $atan2(y, x) / (2.0 * PI) * 65536.0;
      dz = real'(vzo) - ez;
      if (dz > 32768.0) dz -= 65536.0;
      if (dz < -32768.0) dz += 65536.0;
      checks++;
      if (dz > 4.0 || dz < -4.0 ||
          real'(vxo) < K * $sqrt(x * x + y * y) * 0.999 || real'(vxo) > K * $sqrt(x * x + y * y) * 1.001) begin
        failures++;
        if (failures < 10) $display("FAIL vec x=%f y=%f z=%0d expected %f |%0d|", x, y, vzo, ez, vxo);
      end
      begin
        automatic real a = z / 65536.0 * 2.0 * PI;
        automatic real xr = 1000.0;
        automatic real yr = real'(int'(y / 1.0e8 * 1000.0));
        ex = K * (xr * $cos(a) - yr * $sin(a));
        ey = K * (xr * $sin(a) + yr * $cos(a));
      end
      checks++;
      if (real'(rxo) - ex > 6.0 || ex - real'(rxo) > 6.0 || real'(ryo) - ey > 6.0 || ey - real'(ryo) > 6.0) begin
        failures++;
        if (failures < 10) $display("FAIL rot r_out=%0d", r_out);
        if (failures < 10) $display("FAIL rot z=%f got %0d %0d expected %f %f", z, rxo, ryo, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
