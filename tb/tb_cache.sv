// tb_cache: the cache against a reference memory and a reference directory (valid + tag
// per line) kept by the testbench.  A small responder stands in for the request
// controller and DDR2, with random full flags and random gaps in the read data.
// Checks: every loaded word; a predicted read hit stalls for zero cycles (data one cycle
// after the request) and causes no DDR2 traffic; a predicted read miss causes exactly one
// block read; every store causes exactly one block write whose mask covers only the stored
// bytes; a store miss does not allocate; dout stays valid while only stall_in is high.
module tb_cache;
  import mem_pkg::*;
  import tb_mem_pkg::*;

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic [31:0] addr, din, dout;
  logic re, stall_in, stall;
  logic [3:0] we;
  logic [2:0] af_cmd_din;
  logic [30:0] af_addr_din;
  logic af_wr_en, af_full, wdf_wr_en, wdf_full, rdf_valid, rdf_rd_en;
  logic [127:0] wdf_din, rdf_dout;
  logic [15:0] wdf_mask_din;

  cache dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------------ DDR2 stand-in
  logic [31:0] ddr [logic [31:0]];            // word address -> word
  function automatic logic [31:0] ddr_rd(input logic [31:0] wa);
    return ddr.exists(wa) ? ddr[wa] : init_word({wa[29:0], 2'b00});
  endfunction
  int n_ddr_reads = 0, n_ddr_writes = 0;
  logic [30:0] rd_addr_q [$];
  logic [30:0] wr_addr;
  logic        wr_second = 0;
  int          rd_beat = 0, rd_wait = 0;
  logic [31:0] last_wr_mask_bytes;            // number of unmasked bytes in the last write
  int          unmasked;

  always @(negedge clk) begin
    af_full  <= ($urandom % 4) == 0;
    wdf_full <= ($urandom % 4) == 0;
  end

  function automatic logic [127:0] beat_of(input logic [30:0] a, input int b);
    logic [127:0] r;
    for (int w = 0; w < 4; w++) r[32*w +: 32] = ddr_rd({a[27:2], 1'(b), 2'(w)} );
    return r;
  endfunction

  always_comb begin
    rdf_valid = (rd_addr_q.size() != 0) && (rd_wait == 0);
    rdf_dout  = (rd_addr_q.size() != 0) ? beat_of(rd_addr_q[0], rd_beat) : '0;
  end

  always @(posedge clk) if (!rst) begin
    if (af_wr_en && !af_full && af_cmd_din == DDR_CMD_READ) begin
      n_ddr_reads++;
      rd_addr_q.push_back(af_addr_din);
      check(af_addr_din[1:0] == 2'b00 && af_addr_din[30:25] == 0, "read address format");
    end
    if (af_wr_en && !af_full && !wdf_full && af_cmd_din == DDR_CMD_WRITE) begin
      check(wdf_wr_en, "write command without data");
      wr_addr = af_addr_din; wr_second = 1; unmasked = 0;
      for (int i = 0; i < 16; i++) if (!wdf_mask_din[i]) begin
        ddr[{wr_addr[27:2], 1'b0, 2'(i/4)}] = ddr_rd({wr_addr[27:2], 1'b0, 2'(i/4)});
        ddr[{wr_addr[27:2], 1'b0, 2'(i/4)}][8*(i%4) +: 8] = wdf_din[8*i +: 8];
        unmasked++;
      end
    end else if (wr_second && wdf_wr_en && !wdf_full) begin
      for (int i = 0; i < 16; i++) if (!wdf_mask_din[i]) begin
        ddr[{wr_addr[27:2], 1'b1, 2'(i/4)}] = ddr_rd({wr_addr[27:2], 1'b1, 2'(i/4)});
        ddr[{wr_addr[27:2], 1'b1, 2'(i/4)}][8*(i%4) +: 8] = wdf_din[8*i +: 8];
        unmasked++;
      end
      wr_second = 0; n_ddr_writes++;
      last_wr_mask_bytes = unmasked;
    end
    if (rdf_valid && rdf_rd_en) begin
      if (rd_beat == 1) begin rd_beat = 0; void'(rd_addr_q.pop_front()); end
      else rd_beat = 1;
    end
    rd_wait = ($urandom % 3 == 0) ? 1 : 0;
  end

  // make sure the mask of each write has exactly as many bytes as the store
  // (checked by the CPU side below through last_wr_mask_bytes)

  // ------------------------------------------------------------------ CPU side
  localparam int LINES = 256;
  logic        ref_valid [LINES];
  logic [14:0] ref_tag   [LINES];
  logic [31:0] ref_mem   [logic [31:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a[27:2]) ? ref_mem[a[27:2]] : init_word(a);
  endfunction

  typedef enum {K_NONE, K_RHIT, K_RMISS, K_WHIT, K_WMISS} kind_e;
  kind_e       p_kind, q_kind;
  logic [31:0] q_expect;
  logic [3:0]  q_we;
  int          q_stalls, q_reads0, q_writes0;
  logic [31:0] p_expect;
  int          p_reads0, p_writes0;
  logic [3:0]  p_we;
  int n_rhit = 0, n_rmiss = 0, n_whit = 0, n_wmiss = 0, n_hold = 0;

  function automatic logic [31:0] pick_addr();
    logic [31:0] a;
    case ($urandom % 3)
      0: a = 32'h1000_0000 | ($urandom % 8192);     // within one cache size: many hits
      1: a = 32'h1000_0000 | ($urandom % 32768);    // 4x the cache: conflicts
      default: a = 32'h3000_0000 | ($urandom % 1024);
    endcase
    return {a[31:2], 2'b00};
  endfunction

  task automatic issue();
    logic [14:0] t;
    logic [7:0]  ix;
    addr = pick_addr();
    ix = addr[12:5]; t = addr[27:13];
    p_reads0 = n_ddr_reads; p_writes0 = n_ddr_writes;
    if ($urandom % 3 == 0) begin
      re = 0; we = 4'($urandom % 15 + 1); din = $urandom; p_we = we;
      p_kind = (ref_valid[ix] && ref_tag[ix] == t) ? K_WHIT : K_WMISS;
      ref_mem[addr[27:2]] = merge(ref_rd(addr), din, we);
    end else begin
      re = 1; we = 0; din = $urandom;
      p_kind   = (ref_valid[ix] && ref_tag[ix] == t) ? K_RHIT : K_RMISS;
      p_expect = ref_rd(addr);
      ref_valid[ix] = 1; ref_tag[ix] = t;
    end
  endtask

  initial begin
    for (int i = 0; i < LINES; i++) ref_valid[i] = 0;
    re = 0; we = 0; addr = 0; din = 0; stall_in = 0; p_kind = K_NONE;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(negedge clk);
    // Like a pipeline, the stand-in presents the next request in the cycle after the
    // previous one was taken, before it knows whether that one stalls.
    issue();
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      q_kind = p_kind; q_expect = p_expect; q_we = p_we;
      q_reads0 = p_reads0; q_writes0 = p_writes0;
      issue();
      stall_in = ($urandom % 8 == 0);
      #1;
      q_stalls = 0;
      while (stall || stall_in) begin
        if (!stall && stall_in) begin
          n_hold++;
          if (q_kind == K_RHIT || q_kind == K_RMISS) check(dout == q_expect, "dout held");
        end
        if (stall) q_stalls++;
        @(negedge clk);
        stall_in = ($urandom % 8 == 0);
        #1;
      end
      // the previous request is complete now
      unique case (q_kind)
        K_RHIT: begin
          n_rhit++;
          check(dout == q_expect, "read hit data");
          check(q_stalls == 0, "read hit stalled");
          check(n_ddr_reads == q_reads0, "read hit went to DDR2");
        end
        K_RMISS: begin
          n_rmiss++;
          check(dout == q_expect, "read miss data");
          check(q_stalls > 0, "read miss did not stall");
          check(n_ddr_reads == q_reads0 + 1, "read miss block count");
        end
        K_WHIT, K_WMISS: begin
          if (q_kind == K_WHIT) n_whit++; else n_wmiss++;
          check(n_ddr_writes == q_writes0 + 1, "one write per store");
          check(last_wr_mask_bytes == $countones(q_we), "write mask bytes");
          check(q_stalls >= 2, "store stall length");
        end
        default: ;
      endcase
      // the request presented in this cycle is taken at the coming edge
      p_reads0 = n_ddr_reads; p_writes0 = n_ddr_writes;
    end
    @(negedge clk);
    $display("read hits=%0d read misses=%0d store hits=%0d store misses=%0d held=%0d",
             n_rhit, n_rmiss, n_whit, n_wmiss, n_hold);
    check(n_rhit > 100 && n_rmiss > 100 && n_whit > 50 && n_wmiss > 50 && n_hold > 50,
          "every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
