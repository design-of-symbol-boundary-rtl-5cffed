// tb_spram: random reads and writes against an associative-array model;
// read data must appear after the edge and hold while the port is idle or
// writing.
//
// The stimulus and the reference model are this testbench's own; the
// expected behaviour is the one the module's header describes.
module tb_spram;
  logic clk = 0, en = 0, we = 0;
  logic [8:0] addr = 0;
  logic [19:0] wdata = 0, rdata;
  logic [19:0] model [512];
  logic [19:0] last;
  int checks = 0, failures = 0;

  spram dut (.*);
  always #5 clk = !clk;

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(a); wdata = 20'($urandom); model[a] = wdata;
    end
    @(negedge clk) en = 0;
    last = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1); addr = 9'($urandom);
      wdata = 20'($urandom);
      @(posedge clk);
      if (en && we) model[addr] = wdata;
      else if (en) last = model[addr];
      #1;
      if (c > 0 && last != 0) begin
        checks++;
        if (rdata != last) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d rdata %h expected %h", c, rdata, last);
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
