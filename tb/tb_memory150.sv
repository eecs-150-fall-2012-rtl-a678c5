// tb_memory150: the two caches, request controller and clock-crossing FIFOs, with the
// DDR2 controller model on a 200 MHz clock and the CPU side on 50 MHz.  A CPU stand-in
// drives both cache ports every cycle and freezes while `stall` is high.  The data port
// reads and writes region A (written only through the data cache) and region B; stores to
// region B go to both caches at once, as a program store to the 0x3 segment does, so the
// instruction port, which reads region B, never sees stale data.  Every loaded word is
// compared with a reference memory.  The test counts instruction and data misses, misses
// of both caches in flight together, stores, full write-data FIFO, and checks that a loop
// over a working set that fits the caches runs without any stall once warm.
module tb_memory150;
  import mem_pkg::*;
  import tb_mem_pkg::*;

  logic clk = 0, rst = 1, ddr_clk = 0, ddr_rst = 1;
  always #10 clk = ~clk;
  always #2.5 ddr_clk = ~ddr_clk;

  logic [31:0] icache_addr, icache_din, icache_dout, dcache_addr, dcache_din, dcache_dout;
  logic icache_re, dcache_re, stall;
  logic [3:0] icache_we, dcache_we;
  logic [2:0] mig_af_cmd;
  logic [30:0] mig_af_addr;
  logic mig_af_valid, mig_af_rd_en, mig_wdf_valid, mig_wdf_rd_en, mig_rdf_wr_en, mig_rdf_full;
  logic [127:0] mig_wdf_data, mig_rdf_data;
  logic [15:0] mig_wdf_mask;
  int n_reads, n_writes, n_pauses;

  memory150 dut (.*);
  mig_model #(.READ_LAT(8), .PAUSE_PCT(4), .PAUSE_LEN(300)) mig (
    .ddr_clk, .ddr_rst,
    .af_cmd (mig_af_cmd), .af_addr (mig_af_addr), .af_valid (mig_af_valid), .af_rd_en (mig_af_rd_en),
    .wdf_data (mig_wdf_data), .wdf_mask (mig_wdf_mask), .wdf_valid (mig_wdf_valid),
    .wdf_rd_en (mig_wdf_rd_en),
    .rdf_data (mig_rdf_data), .rdf_wr_en (mig_rdf_wr_en), .rdf_full (mig_rdf_full),
    .n_reads, .n_writes, .n_pauses
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a[27:2]) ? ref_mem[a[27:2]] : init_word(a);
  endfunction

  // mechanism counters
  int n_imiss = 0, n_dmiss = 0, n_both = 0, n_store = 0, n_wdf_full = 0, n_stall = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_icache.state == dut.u_icache.S_RD_REQ) n_imiss++;
    if (dut.u_dcache.state == dut.u_dcache.S_RD_REQ) n_dmiss++;
    if (dut.u_icache.state inside {dut.u_icache.S_RD_BEAT0, dut.u_icache.S_RD_BEAT1} &&
        dut.u_dcache.state inside {dut.u_dcache.S_RD_BEAT0, dut.u_dcache.S_RD_BEAT1}) n_both++;
    if (dut.wdf_full) n_wdf_full++;
    if (stall) n_stall++;
  end

  logic        pi_re, pd_re;
  logic [31:0] pi_exp, pd_exp, qi_exp, qd_exp;
  logic        qi_re, qd_re;
  int          loop_stalls;
  bit          hot_loop = 0;
  int          hot_i = 0;

  task automatic issue();
    logic [31:0] a;
    // instruction port: region B (0x1000_2000 .. 0x1000_3FFF), or a small hot set
    a = hot_loop ? (32'h1000_2000 + 32'(4 * (hot_i % 256))) : (32'h1000_2000 | ($urandom % 8192));
    icache_addr = {a[31:2], 2'b00}; icache_re = 1; icache_we = 0; icache_din = 0;
    pi_re = 1; pi_exp = ref_rd(icache_addr);
    // data port
    dcache_we = 0; dcache_re = 0; dcache_din = $urandom;
    if (hot_loop) begin
      dcache_addr = 32'h1000_0000 + 32'(4 * (hot_i % 512)); dcache_re = 1;
    end else begin
      case ($urandom % 6)
        0, 1: begin dcache_addr = 32'h1000_0000 | ($urandom % 24576); dcache_re = 1; end
        2:    begin dcache_addr = 32'h1000_0000 | ($urandom % 8192);  dcache_we = 4'($urandom % 15 + 1); end
        3:    begin    // a store to region B, seen by both caches
                dcache_addr = 32'h3000_2000 | ($urandom % 8192);
                dcache_we = 4'($urandom % 15 + 1);
                icache_addr = dcache_addr; icache_we = dcache_we; icache_re = 0;
                icache_din = dcache_din; pi_re = 0;
              end
        4:    begin dcache_addr = 32'h3000_2000 | ($urandom % 8192); dcache_re = 1; end
        default: ;
      endcase
      dcache_addr[1:0] = 2'b00;
    end
    hot_i++;
    pd_re = dcache_re;
    if (dcache_re) pd_exp = ref_rd(dcache_addr);
    if (dcache_we != 0) begin
      ref_mem[dcache_addr[27:2]] = merge(ref_rd(dcache_addr), dcache_din, dcache_we);
      n_store++;
    end
  endtask

  initial begin
    icache_addr = 0; icache_re = 0; icache_we = 0; icache_din = 0;
    dcache_addr = 0; dcache_re = 0; dcache_we = 0; dcache_din = 0;
    pi_re = 0; pd_re = 0;
    repeat (4) @(posedge clk); #1 rst = 0; ddr_rst = 0;
    // The CPU stand-in presents a new request in the cycle after the previous one was
    // taken, before it knows whether that one stalls, as a pipeline does; it then holds
    // the new request until stall is low and checks the previous one's data.
    @(negedge clk);
    issue();
    for (int n = 0; n < 12000; n++) begin
      if (n == 9000) hot_loop = 1;
      @(negedge clk);
      qi_re = pi_re; qi_exp = pi_exp; qd_re = pd_re; qd_exp = pd_exp;
      issue();
      #1;
      while (stall) begin
        if (n >= 10000) loop_stalls++;
        @(negedge clk); #1;
      end
      if (qi_re) check(icache_dout == qi_exp, "instruction port data");
      if (qd_re) check(dcache_dout == qd_exp, "data port data");
    end
    $display("imiss=%0d dmiss=%0d both_in_flight=%0d stores=%0d wdf_full_cycles=%0d stall_cycles=%0d ddr_reads=%0d ddr_writes=%0d pauses=%0d",
             n_imiss, n_dmiss, n_both, n_store, n_wdf_full, n_stall, n_reads, n_writes, n_pauses);
    check(loop_stalls == 0, "warm loop ran without stalls");
    check(n_imiss > 100 && n_dmiss > 100, "misses on both caches");
    check(n_both > 10, "both caches reading at once");
    check(n_wdf_full > 0, "write-data FIFO filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
