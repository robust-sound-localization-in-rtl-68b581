// sram_block: one on-chip memory block, by default 1024 words of 32 bits
// (4 kB, the block size of the document).
//
// Single port, synchronous: with en high, a write stores wdata at addr on the
// clock edge; a read presents mem[addr] on rdata one cycle later. The chip
// uses five such blocks. The single port and one-cycle read latency are this
// design's assumptions; the document gives only the size.
module sram_block #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
