// tb_corr_delay_line: random codes shifted into the 300-tap delay line with
// random gaps; every cycle all taps and the zero count are compared with a
// reference array model.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_corr_delay_line;
  import sync_pkg::*;
  localparam int L = CORR_LEN;
  logic clk = 0, rst_n = 0, shift = 0;
  qsym_t din;
  qsym_t taps [L];
  logic [8:0] zeros;
  int checks = 0, failures = 0;
  qsym_t model [L];

  corr_delay_line dut (.*);
  always #5 clk = !clk;

  function automatic qsym_t rnd();
    automatic int r = $urandom_range(0, 2);
    return (r == 0) ? '{neg: 1'b0, pos: 1'b0} : (r == 1) ? '{neg: 1'b0, pos: 1'b1}
                                                        : '{neg: 1'b1, pos: 1'b0};
  endfunction

  initial begin
    din = '{neg: 1'b0, pos: 1'b0};
    for (int j = 0; j < L; j++) model[j] = '{neg: 1'b0, pos: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din = rnd();
      if (c > 1000 && c < 1400) din = '{neg: 1'b0, pos: 1'b0};  // long run of zeros
      @(posedge clk);
      if (shift) begin
        for (int j = L - 1; j > 0; j--) model[j] = model[j-1];
        model[0] = din;
      end
      #1;
      begin
        automatic int z = 0;
        automatic bit ok = 1;
        for (int j = 0; j < L; j++) begin
          if (model[j] == '{neg: 1'b0, pos: 1'b0}) z++;
          if (taps[j] != model[j]) ok = 0;
        end
        checks++;
        if (!ok || zeros != 9'(z)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d zeros %0d expected %0d taps_ok %0d", c, zeros, z, ok);
        end
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
