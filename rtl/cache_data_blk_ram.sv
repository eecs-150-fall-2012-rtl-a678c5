// cache_data_blk_ram: the block RAM that holds a cache's data.
//
// Simple dual-port synchronous RAM: one write port with a byte-enable per byte and one read
// port.  Each entry is one 128-bit half of a cache block, so a refill writes a whole entry per
// DDR2 beat and a CPU store writes the bytes of one word.  Reads are registered: the address
// given in cycle t produces data in cycle t+1.  A read and a write of the same entry in one
// cycle return the old contents (read-first), as a Xilinx block RAM in that mode does.
// The document only names this RAM; its organisation (512 x 128 bits for 8 KB) is this
// design's choice.  There is no reset: the valid bits kept by the cache make stale data
// harmless.
module cache_data_blk_ram #(
  parameter int unsigned DEPTH = 512,   // entries (8 KB / 16 bytes)
  parameter int unsigned WIDTH = 128    // bits per entry, a multiple of 8
) (
  input  logic                       clk,
  // write port
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  logic [WIDTH/8-1:0]         wbe,     // byte enables, active high
  input  logic [WIDTH-1:0]           wdata,
  // read port
  input  logic                       re,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [WIDTH-1:0]           rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    for (int b = 0; b < WIDTH / 8; b++) begin
      if (wbe[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

endmodule
