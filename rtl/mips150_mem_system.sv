// mips150_mem_system: everything between the MIPS150 CPU pipeline and the DDR2 memory
// controller: the address decoder, the BIOS memory, the I/O page with the benchmarking
// counters, and the cached memory (two 8 KB caches, request controller, clock-crossing
// FIFOs).
//
// The CPU connects with a fetch port (pc -> instr) and a data port (data_addr/re/we/din ->
// data_dout); both answer one cycle after the request, and `stall` tells the CPU to freeze
// its pipeline (no clock gating) while a cache misses or writes through.  `data_pc` is the
// PC of the instruction that makes the data access; it decides whether stores to 0x2/0x3
// may write the instruction cache.  The UART handshake and the DDR2 controller's FIFO ends
// (on ddr_clk) are brought out as ports.  After reset the CPU is expected to fetch from
// 0x4000_0000, the start of the BIOS.
// The partitioning and the interfaces follow the document; the timing conventions are
// those of a block-RAM-based pipeline, as the document's cache interface implies.
module mips150_mem_system
  import mem_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned BIOS_WORDS  = 4096,
  parameter string       BIOS_FILE   = ""
) (
  input  logic                     clk,        // CPU clock, 50 MHz
  input  logic                     rst,
  // CPU
  input  logic [31:0]              pc,
  output logic [31:0]              instr,
  input  logic [31:0]              data_addr,
  input  logic                     data_re,
  input  logic [3:0]               data_we,
  input  logic [31:0]              data_din,
  input  logic [31:0]              data_pc,
  output logic [31:0]              data_dout,
  output logic                     stall,
  // UART
  input  logic                     uart_tx_ready,
  output logic [7:0]               uart_tx_data,
  output logic                     uart_tx_valid,
  input  logic                     uart_rx_valid,
  input  logic [7:0]               uart_rx_data,
  output logic                     uart_rx_ready,
  // DDR2 memory controller side, 200 MHz
  input  logic                     ddr_clk,
  input  logic                     ddr_rst,
  output logic [CMD_BITS-1:0]      mig_af_cmd,
  output logic [DDR_ADDR_BITS-1:0] mig_af_addr,
  output logic                     mig_af_valid,
  input  logic                     mig_af_rd_en,
  output logic [BEAT_BITS-1:0]     mig_wdf_data,
  output logic [BEAT_BYTES-1:0]    mig_wdf_mask,
  output logic                     mig_wdf_valid,
  input  logic                     mig_wdf_rd_en,
  input  logic [BEAT_BITS-1:0]     mig_rdf_data,
  input  logic                     mig_rdf_wr_en,
  output logic                     mig_rdf_full
);

  localparam int unsigned BW = $clog2(BIOS_WORDS);

  logic [31:0] icache_addr, icache_din, icache_dout;
  logic        icache_re;
  logic [3:0]  icache_we;
  logic [31:0] dcache_addr, dcache_din, dcache_dout;
  logic        dcache_re;
  logic [3:0]  dcache_we;
  logic        bios_ena, bios_enb;
  logic [31:0] bios_addra, bios_addrb, bios_douta, bios_doutb;
  logic [31:0] io_addr, io_din, io_dout;
  logic        io_re;
  logic [3:0]  io_we;

  mem_decode u_decode (
    .clk, .rst, .stall,
    .pc, .instr, .data_addr, .data_re, .data_we, .data_din, .data_pc, .data_dout,
    .icache_addr, .icache_re, .icache_we, .icache_din, .icache_dout,
    .dcache_addr, .dcache_re, .dcache_we, .dcache_din, .dcache_dout,
    .bios_ena, .bios_addra, .bios_douta, .bios_enb, .bios_addrb, .bios_doutb,
    .io_addr, .io_re, .io_we, .io_din, .io_dout
  );

  bios_mem #(.DEPTH(BIOS_WORDS), .INIT_FILE(BIOS_FILE)) u_bios (
    .clk,
    .ena (bios_ena), .addra (bios_addra[2 +: BW]), .douta (bios_douta),
    .enb (bios_enb), .addrb (bios_addrb[2 +: BW]), .doutb (bios_doutb)
  );

  io_regs u_io (
    .clk, .rst, .stall,
    .addr (io_addr), .re (io_re), .we (io_we), .din (io_din), .dout (io_dout),
    .uart_tx_ready, .uart_tx_data, .uart_tx_valid,
    .uart_rx_valid, .uart_rx_data, .uart_rx_ready
  );

  memory150 #(.CACHE_BYTES(CACHE_BYTES), .FIFO_DEPTH(FIFO_DEPTH)) u_mem (
    .clk, .rst,
    .icache_addr, .icache_re, .icache_we, .icache_din, .icache_dout,
    .dcache_addr, .dcache_re, .dcache_we, .dcache_din, .dcache_dout,
    .stall,
    .ddr_clk, .ddr_rst,
    .mig_af_cmd, .mig_af_addr, .mig_af_valid, .mig_af_rd_en,
    .mig_wdf_data, .mig_wdf_mask, .mig_wdf_valid, .mig_wdf_rd_en,
    .mig_rdf_data, .mig_rdf_wr_en, .mig_rdf_full
  );

endmodule
