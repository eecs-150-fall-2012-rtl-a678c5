// cache: direct-mapped, write-through, write-no-allocate cache with 256-bit blocks,
// 8 KB by default, used both as the instruction cache and as the data cache.
//
// CPU side.  The CPU presents addr/re/we/din every cycle.  A request is taken into the
// request register on every cycle in which the memory system is not stalled (this cache's
// own `stall` or the rest of the system's `stall_in`); the tag and data RAMs are read with
// it at the same edge, so `dout` holds the word one cycle later, like a block RAM.  In that
// cycle the tag is compared.  A read hit costs no stall.  A read miss raises `stall` at once
// (combinationally, in the cycle after the request) and keeps it up while the block is
// fetched from DDR2; the RAMs are then re-read and `stall` falls in the cycle in which `dout`
// carries the requested word.  Every store (any bit of `we` set) is written through to DDR2
// and stalls until both write beats are in the FIFOs; a store that hits also updates the
// line, a store that misses leaves the cache unchanged (no allocate).  While stalled, the
// cache holds its request, so `dout` stays valid as long as someone else stalls.
//
// DDR2 side (through the request controller).  A write is one command on af_* with the
// first 128-bit beat on wdf_* in the same cycle, taken when !af_full && !wdf_full, then the
// second beat when !wdf_full.  A read is one command on af_* taken when !af_full, then
// rdf_rd_en is held high and one 128-bit half block is stored in each cycle rdf_valid is
// high, low half first.  af_wr_en and wdf_wr_en act as valid signals: they are raised by
// state alone and stay up until the full flags let the transfer happen.  The byte mask
// wdf_mask_din is active low (0 = write this byte); the stored word is copied to all four
// word lanes and only its own bytes are unmasked.
//
// Command codes, address format, beat order and the write/read sequences follow the memory
// controller interface; the state machine, the one-cycle refetch after a refill, the
// external valid bits and the hold-on-stall behaviour are this design's own.
module cache
  import mem_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,  // capacity
  parameter int unsigned MEM_BITS    = 28     // byte-address bits backed by DDR2 (256 MB)
) (
  input  logic                     clk,
  input  logic                     rst,
  // CPU side
  input  logic [31:0]              addr,
  input  logic                     re,
  input  logic [3:0]               we,
  input  logic [31:0]              din,
  output logic [31:0]              dout,
  input  logic                     stall_in,   // another part of the system stalls
  output logic                     stall,      // this cache is servicing a miss or a store
  // request controller side
  output logic [CMD_BITS-1:0]      af_cmd_din,
  output logic [DDR_ADDR_BITS-1:0] af_addr_din,
  output logic                     af_wr_en,
  input  logic                     af_full,
  output logic [BEAT_BITS-1:0]     wdf_din,
  output logic [BEAT_BYTES-1:0]    wdf_mask_din,
  output logic                     wdf_wr_en,
  input  logic                     wdf_full,
  input  logic [BEAT_BITS-1:0]     rdf_dout,
  input  logic                     rdf_valid,
  output logic                     rdf_rd_en
);

  localparam int unsigned LINES      = CACHE_BYTES / (BLOCK_BITS / 8);
  localparam int unsigned INDEX_BITS = $clog2(LINES);
  localparam int unsigned TAG_BITS   = MEM_BITS - 5 - INDEX_BITS;
  localparam int unsigned HALF_BITS  = INDEX_BITS + 1;

  typedef enum logic [2:0] {
    S_IDLE, S_WR_REQ, S_WR_BEAT2, S_RD_REQ, S_RD_BEAT0, S_RD_BEAT1, S_REFETCH
  } state_e;

  state_e state, state_n;

  // request register
  logic [31:0] r_addr;
  logic        r_re;
  logic [3:0]  r_we;
  logic [31:0] r_din;
  logic        r_done;      // the store in r_* has been written through

  logic [INDEX_BITS-1:0] r_index;
  logic [TAG_BITS-1:0]   r_tag;
  assign r_index = r_addr[5 +: INDEX_BITS];
  assign r_tag   = r_addr[5 + INDEX_BITS +: TAG_BITS];

  logic [LINES-1:0]      valid;
  logic [TAG_BITS-1:0]   tag_q;
  logic [BEAT_BITS-1:0]  data_q;

  logic hold;
  assign hold = stall | stall_in;

  // RAM read address: the new request when it is accepted, else the held one
  logic [31:0] ram_addr;
  assign ram_addr = hold ? r_addr : addr;

  logic                  tag_we;
  logic [HALF_BITS-1:0]  data_waddr;
  logic [BEAT_BYTES-1:0] data_wbe;
  logic [BEAT_BITS-1:0]  data_wdata;

  cache_tag_blk_ram #(.DEPTH(LINES), .WIDTH(TAG_BITS)) u_tags (
    .clk   (clk),
    .we    (tag_we),
    .waddr (r_index),
    .wdata (r_tag),
    .re    (1'b1),
    .raddr (ram_addr[5 +: INDEX_BITS]),
    .rdata (tag_q)
  );

  cache_data_blk_ram #(.DEPTH(2 * LINES), .WIDTH(BEAT_BITS)) u_data (
    .clk   (clk),
    .waddr (data_waddr),
    .wbe   (data_wbe),
    .wdata (data_wdata),
    .re    (1'b1),
    .raddr (ram_addr[4 +: HALF_BITS]),
    .rdata (data_q)
  );

  logic line_hit, is_store, read_miss;
  assign line_hit  = valid[r_index] && (tag_q == r_tag);
  assign is_store  = (r_we != 4'b0) && !r_done;
  assign read_miss = r_re && (r_we == 4'b0) && !line_hit;

  assign stall = (state != S_IDLE) || is_store || read_miss;
  assign dout  = data_q[32 * r_addr[3:2] +: 32];

  // store data placed in its word lane, and the byte lanes it covers
  logic [BEAT_BYTES-1:0] store_be;
  always_comb begin
    store_be = '0;
    store_be[4 * r_addr[3:2] +: 4] = r_we;
  end

  always_comb begin
    state_n      = state;
    tag_we       = 1'b0;
    data_waddr   = {r_index, r_addr[4]};
    data_wbe     = '0;
    data_wdata   = {4{r_din}};
    af_cmd_din   = DDR_CMD_READ;
    af_addr_din  = ddr_block_addr(r_addr);
    af_wr_en     = 1'b0;
    wdf_din      = {4{r_din}};
    wdf_mask_din = '1;
    wdf_wr_en    = 1'b0;
    rdf_rd_en    = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (is_store) begin
          if (line_hit) data_wbe = store_be;   // write-through: update a hit line too
          state_n = S_WR_REQ;
        end else if (read_miss) begin
          state_n = S_RD_REQ;
        end
      end
      S_WR_REQ: begin
        af_cmd_din   = DDR_CMD_WRITE;
        af_wr_en     = 1'b1;
        wdf_wr_en    = 1'b1;
        wdf_mask_din = r_addr[4] ? '1 : ~store_be;
        if (!af_full && !wdf_full) state_n = S_WR_BEAT2;
      end
      S_WR_BEAT2: begin
        wdf_wr_en    = 1'b1;
        wdf_mask_din = r_addr[4] ? ~store_be : '1;
        if (!wdf_full) state_n = S_IDLE;
      end
      S_RD_REQ: begin
        af_wr_en = 1'b1;
        if (!af_full) state_n = S_RD_BEAT0;
      end
      S_RD_BEAT0: begin
        rdf_rd_en  = 1'b1;
        data_waddr = {r_index, 1'b0};
        data_wdata = rdf_dout;
        if (rdf_valid) begin
          data_wbe = '1;
          state_n  = S_RD_BEAT1;
        end
      end
      S_RD_BEAT1: begin
        rdf_rd_en  = 1'b1;
        data_waddr = {r_index, 1'b1};
        data_wdata = rdf_dout;
        if (rdf_valid) begin
          data_wbe = '1;
          tag_we   = 1'b1;
          state_n  = S_REFETCH;
        end
      end
      S_REFETCH: state_n = S_IDLE;   // RAMs re-read the refilled line this cycle
      default:   state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      valid  <= '0;
      r_addr <= '0;
      r_re   <= 1'b0;
      r_we   <= '0;
      r_din  <= '0;
      r_done <= 1'b0;
    end else begin
      state <= state_n;
      if (tag_we) valid[r_index] <= 1'b1;
      if (state == S_WR_BEAT2 && !wdf_full) r_done <= 1'b1;
      if (!hold) begin
        r_addr <= addr;
        r_re   <= re;
        r_we   <= we;
        r_din  <= din;
        r_done <= 1'b0;
      end
    end
  end

  // a command is only ever a read or a write
  a_cmd_legal: assert property (@(posedge clk) disable iff (rst)
    af_wr_en |-> (af_cmd_din == DDR_CMD_READ || af_cmd_din == DDR_CMD_WRITE));
  // a write command always carries its first data beat
  a_write_has_data: assert property (@(posedge clk) disable iff (rst)
    (af_wr_en && af_cmd_din == DDR_CMD_WRITE) |-> wdf_wr_en);

endmodule
