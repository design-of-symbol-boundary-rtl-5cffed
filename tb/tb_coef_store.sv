// tb_coef_store: writes a random table through the write port and reads
// every (half, hypothesis) vector back, checking that preamble sample m sits
// at tap L-1-m; an out-of-range hypothesis write must change nothing.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_coef_store;
  import sync_pkg::*;
  localparam int L = CORR_LEN;
  logic clk = 0, we = 0, w_half = 0, w_c = 0, w_d = 0, r_half = 0;
  logic [2:0] w_hyp = 0, r_hyp = 0;
  logic [8:0] w_idx = 0;
  logic [L-1:0] c_vec, d_vec;
  bit mc [2][7][L];
  bit md [2][7][L];
  int checks = 0, failures = 0;

  coef_store dut (.*);
  always #5 clk = !clk;

  initial begin
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < 7; i++)
        for (int m = 0; m < L; m++) begin
          @(negedge clk);
          we = 1; w_half = h[0]; w_hyp = 3'(i); w_idx = 9'(m);
          w_c = 1'($urandom_range(0, 1)); w_d = 1'($urandom_range(0, 1));
          mc[h][i][m] = w_c; md[h][i][m] = w_d;
        end
    @(negedge clk);
    w_hyp = 3'd7; w_idx = 9'd0; w_c = !mc[0][0][0]; w_half = 0;   // ignored
    @(negedge clk) we = 0;
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < 8; i++) begin
        automatic bit ok = 1;
        r_half = h[0]; r_hyp = 3'(i);
        #1;
        for (int m = 0; m < L; m++) begin
          automatic bit ec = (i < 7) ? mc[h][i][m] : 1'b0;
          automatic bit ed = (i < 7) ? md[h][i][m] : 1'b0;
          if (c_vec[L-1-m] != ec || d_vec[L-1-m] != ed) ok = 0;
        end
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL half %0d hyp %0d", h, i);
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
