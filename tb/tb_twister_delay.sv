// tb_twister_delay: random samples with random gaps through the 1024-sample
// two-bank delay line; once 1024 samples are in, every output must equal the
// input of exactly 1024 samples earlier.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_twister_delay;
  logic clk = 0, rst_n = 0, en = 0;
  logic [19:0] din = 0, dout;
  logic [19:0] hist [6000];
  int checks = 0, failures = 0;

  twister_delay dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      din = 20'($urandom); hist[n] = din; en = 1;
      if (n >= 1024) begin
        checks++;
        if (dout != hist[n - 1024]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d dout %h expected %h", n, dout, hist[n - 1024]);
        end
      end
      @(negedge clk) en = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
