// cache_tag_blk_ram: the block RAM that holds a cache's tags.
//
// Simple dual-port synchronous RAM with one entry per cache line: one write port and one
// registered read port (address in cycle t, tag out in cycle t+1, read-first on a collision).
// The valid bits are kept outside, in flip-flops, so that reset can clear them in one cycle.
// The document only names this RAM; its width (15 tag bits for an 8 KB direct-mapped cache
// over 256 MB of DDR2) follows from the cache geometry.
module cache_tag_blk_ram #(
  parameter int unsigned DEPTH = 256,   // cache lines
  parameter int unsigned WIDTH = 15     // tag bits
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       re,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [WIDTH-1:0]           rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
