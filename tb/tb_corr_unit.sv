// tb_corr_unit: random taps (with a random share of zeros) and coefficient
// vectors; the unsigned formulation 2*M + Z - L must equal the signed sum
// of a_j * c_j computed directly.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_corr_unit;
  import sync_pkg::*;
  localparam int L = CORR_LEN;
  qsym_t taps [L];
  logic [L-1:0] coef;
  logic [8:0] zeros;
  logic signed [10:0] result;
  int checks = 0, failures = 0;

  corr_unit dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      automatic int s = 0, z = 0;
      automatic int pz = $urandom_range(0, 100);
      for (int j = 0; j < L; j++) begin
        automatic int a;
        if (t == 0) a = 1; else if (t == 1) a = -1;
        else if ($urandom_range(0, 99) < pz) a = 0;
        else a = $urandom_range(0, 1) ? 1 : -1;
        taps[j] = '{neg: (a < 0), pos: (a > 0)};
        coef[j] = (t < 2) ? 1'b0 : 1'($urandom_range(0, 1));
        if (a == 0) z++;
        s += a * (coef[j] ? -1 : 1);
      end
      zeros = 9'(z);
      #1;
      checks++;
      if (int'(result) != s) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d result %0d expected %0d", t, result, s);
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
