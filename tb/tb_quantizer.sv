// tb_quantizer: exhaustive test of the three-level quantiser for every
// 10-bit component value and a set of thresholds, against a reference
// written with integer comparisons.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_quantizer;
  import sync_pkg::*;
  logic signed [9:0] re, im;
  logic [8:0] thresh;
  qsym_t q_re, q_im;
  int checks = 0, failures = 0;

  quantizer dut (.*);

  function automatic qsym_t ref_q(int x, int t);
    qsym_t r;
    automatic int m = (x < 0) ? -x : x;
    r.pos = (x > 0) && (m >= t);
    r.neg = (x < 0) && (m >= t);
    if (t == 0 && x == 0) r = '{neg: 1'b0, pos: 1'b0};
    return r;
  endfunction

  initial begin
    int tl [5] = '{1, 8, 40, 200, 511};
    foreach (tl[ti]) begin
      thresh = 9'(tl[ti]);
      for (int x = -512; x < 512; x++) begin
        re = 10'(x); im = 10'(-x - 1);
        #1;
        checks++;
        if (q_re != ref_q(x, tl[ti]) || q_im != ref_q(-x - 1, tl[ti])) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d t=%0d got %b %b", x, tl[ti], q_re, q_im);
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
