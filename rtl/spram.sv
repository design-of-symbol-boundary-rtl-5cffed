// spram: single-port memory, DEPTH words of W bits, one read or one write
// per cycle (synchronous, read data registered).
//
// Stands for a single-port register file macro.  Write when en && we; read
// when en && !we, the word appears on rdata after the clock edge and stays
// there until the next read.  Contents are not reset.
//
// A single-port register file of 512 words is what the reference design
// uses; this model of it (registered read, output held on writes) is this
// design's own.
module spram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 20,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
