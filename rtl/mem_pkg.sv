// mem_pkg: constants and types shared by the cache, the request controller and the
// CPU-side memory glue of the MIPS150 memory system.
//
// The DDR2 side moves 128-bit beats; a cache block is two beats (256 bits), which is one
// burst of four 64-bit DDR2 words.  DDR2 addresses count 64-bit words: 31 bits are carried,
// of which the low 25 matter (256 MB / 8 bytes = 2^25 words) and the upper 6 are zero.
// Commands are 3'b000 for a write and 3'b001 for a read.  Those numbers come from the
// memory controller's interface; the type names are this design's own.
package mem_pkg;

  localparam int unsigned BEAT_BITS      = 128;            // one FIFO word
  localparam int unsigned BEAT_BYTES     = BEAT_BITS / 8;  // 16
  localparam int unsigned BLOCK_BITS     = 256;            // cache block = 2 beats
  localparam int unsigned DDR_ADDR_BITS  = 31;             // af_addr_din width
  localparam int unsigned CMD_BITS       = 3;

  typedef enum logic [CMD_BITS-1:0] {
    DDR_CMD_WRITE = 3'b000,
    DDR_CMD_READ  = 3'b001
  } ddr_cmd_e;

  // DDR2 word address of the 32-byte block that holds byte address a
  // (low 28 address bits = 256 MB; two zero bits select the start of the burst).
  function automatic logic [DDR_ADDR_BITS-1:0] ddr_block_addr(input logic [31:0] a);
    return {6'b0, a[27:5], 2'b00};
  endfunction

  // Address nibbles of the memory map (address bits 31:28).
  localparam logic [3:0] NIB_ICACHE_PC = 4'b0001;
  localparam logic [3:0] NIB_BIOS      = 4'b0100;
  localparam logic [3:0] NIB_IO        = 4'b1000;

  // I/O register addresses.
  localparam logic [31:0] IO_UART_TX_CTRL = 32'h8000_0000;
  localparam logic [31:0] IO_UART_RX_CTRL = 32'h8000_0004;
  localparam logic [31:0] IO_UART_TX_DATA = 32'h8000_0008;
  localparam logic [31:0] IO_UART_RX_DATA = 32'h8000_000C;
  localparam logic [31:0] IO_CYCLE_CNT    = 32'h8000_0010;
  localparam logic [31:0] IO_INSTR_CNT    = 32'h8000_0014;
  localparam logic [31:0] IO_CNT_RESET    = 32'h8000_0018;

endpackage
