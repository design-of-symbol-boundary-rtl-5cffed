// twister_delay: delay line of DELAY samples made of two single-port
// memories of DELAY/2 words each ("twister" access).
//
// Sample t is written to bank t[0] at address t/2 (mod DELAY/2).  In the
// same cycle the other bank is read at address (t+1)/2, which returns sample
// t-DELAY+1, the slot that bank overwrites next; one output register later
// that is sample (t+1)-DELAY, i.e. exactly DELAY samples behind the sample
// presented with the next en.  Each bank does one access per sample, so two
// single-port memories replace one dual-port memory.
// Interface: en marks a new sample on din; dout is then the sample DELAY
// positions earlier (only meaningful once DELAY samples have been written).
//
// Two 512-word single-port memories with twister access are the reference
// design's choice; the exact address sequence is this design's own.
module twister_delay #(
  parameter int unsigned DELAY = 1024,
  parameter int unsigned W     = 20,
  parameter int unsigned AW    = $clog2(DELAY / 2)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [AW:0]   t;          // sample counter modulo DELAY
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  rdata0, rdata1;
  logic          rbank;      // bank read at the last access

  assign waddr = t[AW:1];
  assign raddr = AW'((t + 1'b1) >> 1);

  spram #(.DEPTH(DELAY / 2), .W(W)) u_bank0 (
    .clk, .en(en), .we(!t[0]), .addr(t[0] ? raddr : waddr),
    .wdata(din), .rdata(rdata0));
  spram #(.DEPTH(DELAY / 2), .W(W)) u_bank1 (
    .clk, .en(en), .we(t[0]), .addr(t[0] ? waddr : raddr),
    .wdata(din), .rdata(rdata1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t     <= '0;
      rbank <= 1'b0;
    end else if (en) begin
      t     <= t + 1'b1;
      rbank <= !t[0];
    end
  end

  assign dout = rbank ? rdata1 : rdata0;

endmodule
