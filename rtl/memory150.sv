// memory150: the cached memory behind the MIPS150 CPU.  It holds the instruction cache,
// the data cache, the request controller that shares the DDR2 interface between them, and
// the three clock-crossing FIFOs (address/command, write data, read data) that lead to the
// DDR2 memory controller.
//
// The CPU side runs on `clk` (50 MHz); the controller side of the FIFOs runs on `ddr_clk`
// (200 MHz) and is brought out as ports, ready for the vendor's DDR2 controller.  `stall` is
// high while either cache services a miss or writes a store through; each cache also holds
// its own request while the other one stalls, so both outputs stay valid until the pipeline
// moves on.  Cache ports follow the CPU timing of a block RAM: request in cycle t, data in
// cycle t+1 unless `stall` is high in t+1.
// Which units exist and how they connect follow the document; the FIFO depth and the way
// the two stall signals are combined are this design's choices.
module memory150
  import mem_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  // instruction cache, CPU side
  input  logic [31:0]              icache_addr,
  input  logic                     icache_re,
  input  logic [3:0]               icache_we,
  input  logic [31:0]              icache_din,
  output logic [31:0]              icache_dout,
  // data cache, CPU side
  input  logic [31:0]              dcache_addr,
  input  logic                     dcache_re,
  input  logic [3:0]               dcache_we,
  input  logic [31:0]              dcache_din,
  output logic [31:0]              dcache_dout,
  output logic                     stall,
  // DDR2 controller side, on ddr_clk
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

  // cache <-> request controller
  logic [CMD_BITS-1:0]      c_af_cmd_din   [2];
  logic [DDR_ADDR_BITS-1:0] c_af_addr_din  [2];
  logic                     c_af_wr_en     [2];
  logic                     c_af_full      [2];
  logic [BEAT_BITS-1:0]     c_wdf_din      [2];
  logic [BEAT_BYTES-1:0]    c_wdf_mask_din [2];
  logic                     c_wdf_wr_en    [2];
  logic                     c_wdf_full     [2];
  logic [BEAT_BITS-1:0]     c_rdf_dout     [2];
  logic                     c_rdf_valid    [2];
  logic                     c_rdf_rd_en    [2];

  logic i_stall, d_stall;
  assign stall = i_stall | d_stall;

  cache #(.CACHE_BYTES(CACHE_BYTES)) u_icache (
    .clk, .rst,
    .addr (icache_addr), .re (icache_re), .we (icache_we), .din (icache_din),
    .dout (icache_dout), .stall_in (d_stall), .stall (i_stall),
    .af_cmd_din (c_af_cmd_din[0]), .af_addr_din (c_af_addr_din[0]),
    .af_wr_en (c_af_wr_en[0]), .af_full (c_af_full[0]),
    .wdf_din (c_wdf_din[0]), .wdf_mask_din (c_wdf_mask_din[0]),
    .wdf_wr_en (c_wdf_wr_en[0]), .wdf_full (c_wdf_full[0]),
    .rdf_dout (c_rdf_dout[0]), .rdf_valid (c_rdf_valid[0]), .rdf_rd_en (c_rdf_rd_en[0])
  );

  cache #(.CACHE_BYTES(CACHE_BYTES)) u_dcache (
    .clk, .rst,
    .addr (dcache_addr), .re (dcache_re), .we (dcache_we), .din (dcache_din),
    .dout (dcache_dout), .stall_in (i_stall), .stall (d_stall),
    .af_cmd_din (c_af_cmd_din[1]), .af_addr_din (c_af_addr_din[1]),
    .af_wr_en (c_af_wr_en[1]), .af_full (c_af_full[1]),
    .wdf_din (c_wdf_din[1]), .wdf_mask_din (c_wdf_mask_din[1]),
    .wdf_wr_en (c_wdf_wr_en[1]), .wdf_full (c_wdf_full[1]),
    .rdf_dout (c_rdf_dout[1]), .rdf_valid (c_rdf_valid[1]), .rdf_rd_en (c_rdf_rd_en[1])
  );

  // request controller <-> FIFOs (CPU clock side)
  logic [CMD_BITS-1:0]      af_cmd_din;
  logic [DDR_ADDR_BITS-1:0] af_addr_din;
  logic                     af_wr_en, af_full;
  logic [BEAT_BITS-1:0]     wdf_din;
  logic [BEAT_BYTES-1:0]    wdf_mask_din;
  logic                     wdf_wr_en, wdf_full;
  logic [BEAT_BITS-1:0]     rdf_dout;
  logic                     rdf_valid, rdf_rd_en;

  request_controller #(.NUM_PORTS(2)) u_arbiter (
    .clk, .rst,
    .c_af_cmd_din, .c_af_addr_din, .c_af_wr_en, .c_af_full,
    .c_wdf_din, .c_wdf_mask_din, .c_wdf_wr_en, .c_wdf_full,
    .c_rdf_dout, .c_rdf_valid, .c_rdf_rd_en,
    .af_cmd_din, .af_addr_din, .af_wr_en, .af_full,
    .wdf_din, .wdf_mask_din, .wdf_wr_en, .wdf_full,
    .rdf_dout, .rdf_valid, .rdf_rd_en
  );

  // mig_af: address and command
  async_fifo #(.WIDTH(CMD_BITS + DDR_ADDR_BITS), .DEPTH(FIFO_DEPTH)) u_mig_af (
    .wclk (clk), .wrst (rst), .wr_en (af_wr_en), .din ({af_cmd_din, af_addr_din}),
    .full (af_full),
    .rclk (ddr_clk), .rrst (ddr_rst), .rd_en (mig_af_rd_en),
    .dout ({mig_af_cmd, mig_af_addr}), .valid (mig_af_valid)
  );

  // mig_wdf: write data with its byte mask
  async_fifo #(.WIDTH(BEAT_BITS + BEAT_BYTES), .DEPTH(FIFO_DEPTH)) u_mig_wdf (
    .wclk (clk), .wrst (rst), .wr_en (wdf_wr_en), .din ({wdf_mask_din, wdf_din}),
    .full (wdf_full),
    .rclk (ddr_clk), .rrst (ddr_rst), .rd_en (mig_wdf_rd_en),
    .dout ({mig_wdf_mask, mig_wdf_data}), .valid (mig_wdf_valid)
  );

  // mig_rdf: read data
  async_fifo #(.WIDTH(BEAT_BITS), .DEPTH(FIFO_DEPTH)) u_mig_rdf (
    .wclk (ddr_clk), .wrst (ddr_rst), .wr_en (mig_rdf_wr_en), .din (mig_rdf_data),
    .full (mig_rdf_full),
    .rclk (clk), .rrst (rst), .rd_en (rdf_rd_en),
    .dout (rdf_dout), .valid (rdf_valid)
  );

endmodule
