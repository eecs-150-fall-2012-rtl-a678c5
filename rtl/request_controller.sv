// request_controller: the memory arbiter between the instruction cache, the data cache
// and the three DDR2 FIFOs.  Each cache sees what looks like FIFOs of its own.
//
// Commands.  A cache asks for the address FIFO by raising af_wr_en.  When both ask in the
// same cycle the one that was not served last wins (round robin).  The cache that is not
// granted sees af_full and wdf_full high, so it simply waits.  A read command is passed on
// when !af_full; a write command together with its first data beat when !af_full &&
// !wdf_full.  After a write's first beat the controller stays locked to that cache until
// its second beat has gone into the write-data FIFO, so the two beats of a block are never
// split by the other cache's data.
//
// Read returns (interleaving).  Every accepted read pushes the requester's number into a
// small in-order queue.  Read data comes back from the read-data FIFO in command order, so
// the head of the queue names the cache that owns the beats now at the FIFO's output:
// only that cache sees rdf_valid, and its rdf_rd_en pops the FIFO.  After two beats (one
// 256-bit block) the queue entry retires.  Both caches can therefore have a read in flight
// at the same time: the second cache's command goes out while the first one's data is
// still on its way.
// The document gives the arbiter's purpose and the cache-side signals; round robin, the
// write lock and the in-order return queue are this design's choices.
module request_controller
  import mem_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 2,   // 0 = instruction cache, 1 = data cache
  parameter int unsigned QDEPTH    = 2    // reads in flight (one per cache suffices)
) (
  input  logic                     clk,
  input  logic                     rst,
  // cache side, one entry per cache
  input  logic [CMD_BITS-1:0]      c_af_cmd_din   [NUM_PORTS],
  input  logic [DDR_ADDR_BITS-1:0] c_af_addr_din  [NUM_PORTS],
  input  logic                     c_af_wr_en     [NUM_PORTS],
  output logic                     c_af_full      [NUM_PORTS],
  input  logic [BEAT_BITS-1:0]     c_wdf_din      [NUM_PORTS],
  input  logic [BEAT_BYTES-1:0]    c_wdf_mask_din [NUM_PORTS],
  input  logic                     c_wdf_wr_en    [NUM_PORTS],
  output logic                     c_wdf_full     [NUM_PORTS],
  output logic [BEAT_BITS-1:0]     c_rdf_dout     [NUM_PORTS],
  output logic                     c_rdf_valid    [NUM_PORTS],
  input  logic                     c_rdf_rd_en    [NUM_PORTS],
  // FIFO side (write ends of mig_af and mig_wdf, read end of mig_rdf)
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

  localparam int unsigned PW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;
  localparam int unsigned QW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  // ---------------------------------------------------------------- command grant
  logic          lock;        // between the two beats of a write
  logic [PW-1:0] lock_port;
  logic [PW-1:0] last;        // port served last, for round robin
  logic [PW-1:0] gnt;
  logic          gnt_any;

  always_comb begin
    gnt     = lock_port;
    gnt_any = lock;
    if (!lock) begin
      // first requester after `last`, wrapping around
      for (int k = NUM_PORTS; k >= 1; k--) begin
        if (c_af_wr_en[(int'(last) + k) % NUM_PORTS]) begin
          gnt     = PW'((int'(last) + k) % NUM_PORTS);
          gnt_any = 1'b1;
        end
      end
    end
  end

  // in-order queue of the ports that have reads in flight
  logic [PW-1:0] q_port [QDEPTH];
  logic [QW:0]   q_count;
  logic [QW-1:0] q_head, q_tail;
  logic          q_full, q_empty, q_push, q_pop;
  assign q_full  = (q_count == (QW+1)'(QDEPTH));
  assign q_empty = (q_count == '0);

  logic is_read, is_write, cmd_go;
  assign is_read  = gnt_any && !lock && (c_af_cmd_din[gnt] == DDR_CMD_READ);
  assign is_write = gnt_any && !lock && (c_af_cmd_din[gnt] == DDR_CMD_WRITE);
  assign cmd_go   = (is_read  && !af_full && !q_full) ||
                    (is_write && !af_full && !wdf_full && c_wdf_wr_en[gnt]);

  assign af_cmd_din   = c_af_cmd_din[gnt];
  assign af_addr_din  = c_af_addr_din[gnt];
  assign af_wr_en     = cmd_go;
  assign wdf_din      = c_wdf_din[gnt];
  assign wdf_mask_din = c_wdf_mask_din[gnt];
  assign wdf_wr_en    = (is_write && cmd_go) ||
                        (lock && c_wdf_wr_en[lock_port] && !wdf_full);
  assign q_push       = is_read && cmd_go;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      c_af_full[p]  = 1'b1;
      c_wdf_full[p] = 1'b1;
    end
    if (lock) begin
      c_wdf_full[lock_port] = wdf_full;
    end else if (gnt_any) begin
      c_af_full[gnt]  = af_full || (is_read && q_full);
      c_wdf_full[gnt] = wdf_full;
    end
  end

  // ---------------------------------------------------------------- read return
  logic          beat;        // 0: first half of the block, 1: second
  logic [PW-1:0] owner;
  assign owner = q_port[q_head];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      c_rdf_dout[p]  = rdf_dout;
      c_rdf_valid[p] = rdf_valid && !q_empty && (owner == PW'(p));
    end
  end
  assign rdf_rd_en = !q_empty && c_rdf_rd_en[owner];
  assign q_pop     = rdf_rd_en && rdf_valid && beat;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (rst) begin
      lock      <= 1'b0;
      lock_port <= '0;
      last      <= PW'(NUM_PORTS - 1);
      q_count   <= '0;
      q_head    <= '0;
      q_tail    <= '0;
      beat      <= 1'b0;
    end else begin
      if (cmd_go) last <= gnt;
      if (is_write && cmd_go) begin
        lock      <= 1'b1;
        lock_port <= gnt;
      end else if (lock && c_wdf_wr_en[lock_port] && !wdf_full) begin
        lock <= 1'b0;
      end
      if (q_push) begin
        q_port[q_tail] <= gnt;
        q_tail <= (q_tail == QW'(QDEPTH - 1)) ? '0 : q_tail + 1'b1;
      end
      if (q_pop) q_head <= (q_head == QW'(QDEPTH - 1)) ? '0 : q_head + 1'b1;
      q_count <= q_count + (QW+1)'(q_push) - (QW+1)'(q_pop);
      if (rdf_rd_en && rdf_valid) beat <= ~beat;
    end
  end

  // read data never arrives without a read in flight
  a_no_orphan_data: assert property (@(posedge clk) disable iff (rst)
    rdf_valid |-> !q_empty);

endmodule
