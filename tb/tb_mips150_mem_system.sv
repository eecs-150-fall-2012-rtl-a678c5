// tb_mips150_mem_system: end-to-end test of the memory system at its default sizes, with
// the DDR2 controller model behind the FIFOs and a CPU stand-in in front.  The stand-in
// walks through what a boot does: it fetches from the BIOS and loads constants from it,
// copies a "program" into the 0x3 segment while running from the BIOS (so both caches get
// it), tries a store to the 0x2 segment from code outside the BIOS (which must not reach
// the instruction cache), then runs the program from the instruction cache while loading
// and storing data through the data cache, talks to the UART and reads and clears the
// cycle and instruction counters.  Every fetched and loaded word is checked against a
// reference model of the memory map, and the counters against a cycle-exact mirror.
// Each mechanism must happen at least once: BIOS fetch and load, instruction and data
// misses, both caches missing together, store hit and store miss (no allocate), the
// write-through stall, the full write-data FIFO, the PC[30] guard, counter clear, UART
// transmit and receive.
module tb_mips150_mem_system;
  import mem_pkg::*;
  import tb_mem_pkg::*;

  logic clk = 0, rst = 1, ddr_clk = 0, ddr_rst = 1;
  always #10 clk = ~clk;
  always #2.5 ddr_clk = ~ddr_clk;

  logic [31:0] pc, instr, data_addr, data_din, data_pc, data_dout;
  logic data_re, stall;
  logic [3:0] data_we;
  logic uart_tx_ready, uart_tx_valid, uart_rx_valid, uart_rx_ready;
  logic [7:0] uart_tx_data, uart_rx_data;
  logic [2:0] mig_af_cmd;
  logic [30:0] mig_af_addr;
  logic mig_af_valid, mig_af_rd_en, mig_wdf_valid, mig_wdf_rd_en, mig_rdf_wr_en, mig_rdf_full;
  logic [127:0] mig_wdf_data, mig_rdf_data;
  logic [15:0] mig_wdf_mask;
  int n_reads, n_writes, n_pauses;

  mips150_mem_system dut (.*);
  mig_model #(.READ_LAT(8), .PAUSE_PCT(3), .PAUSE_LEN(300)) mig (
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
    repeat (600000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // BIOS image: word i = bios_word(i), loaded through the hierarchy
  function automatic logic [31:0] bios_word(input logic [31:0] i);
    return (i * 32'h0101_0101) ^ 32'hB105_0000;
  endfunction
  localparam int BIOS_WORDS = 4096;

  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(32'(a[27:2])) ? ref_mem[32'(a[27:2])] : init_word(a);
  endfunction

  // ---------------------------------------------------------------- mechanism counters
  int m_bios_fetch = 0, m_bios_load = 0, m_imiss = 0, m_dmiss = 0, m_both = 0;
  int m_store_hit = 0, m_store_miss = 0, m_wt_stall = 0, m_wdf_full = 0, m_pc30_block = 0;
  int m_clear = 0, m_tx = 0, m_rx = 0, m_icache_write = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_mem.u_icache.state == dut.u_mem.u_icache.S_RD_REQ) m_imiss++;
    if (dut.u_mem.u_dcache.state == dut.u_mem.u_dcache.S_RD_REQ) m_dmiss++;
    if (dut.u_mem.u_icache.state != dut.u_mem.u_icache.S_IDLE &&
        dut.u_mem.u_dcache.state != dut.u_mem.u_dcache.S_IDLE &&
        dut.u_mem.u_icache.state != dut.u_mem.u_icache.S_REFETCH &&
        dut.u_mem.u_dcache.state != dut.u_mem.u_dcache.S_REFETCH) m_both++;
    if (dut.u_mem.u_dcache.state == dut.u_mem.u_dcache.S_WR_REQ) m_wt_stall++;
    if (dut.u_mem.u_dcache.state == dut.u_mem.u_dcache.S_IDLE && dut.u_mem.u_dcache.is_store) begin
      if (dut.u_mem.u_dcache.line_hit) m_store_hit++; else m_store_miss++;
    end
    if (dut.u_mem.wdf_full) m_wdf_full++;
    if (uart_tx_valid) begin m_tx++; check(uart_tx_data == 8'h5A, "UART byte"); end
    if (uart_rx_ready) m_rx++;
  end

  // cycle-exact mirror of the two counters
  logic [31:0] cyc = 0, ins = 0, io_exp;
  always @(posedge clk) if (!rst) begin
    if (!stall && data_re && data_addr == IO_CYCLE_CNT) io_exp = cyc;
    if (!stall && data_re && data_addr == IO_INSTR_CNT) io_exp = ins;
    if (!stall && data_we != 0 && data_addr == IO_CNT_RESET) begin cyc = 0; ins = 0; m_clear++; end
    else begin cyc++; if (!stall) ins++; end
  end

  // ---------------------------------------------------------------- CPU stand-in
  typedef enum {E_NONE, E_VAL, E_IO} exp_e;
  exp_e        pd_kind;
  logic [31:0] pi_exp, pd_exp;
  bit          pi_chk;

  function automatic logic [31:0] fetch_exp(input logic [31:0] a);
    if (a[31:28] == 4'h4) return bios_word(32'(a[13:2]));
    if (a[31:28] == 4'h1) return ref_rd(a);
    return 0;
  endfunction

  // Present one cycle's fetch and data access in the cycle after the previous one was
  // taken (before knowing whether that one stalls, as a pipeline does), hold it while
  // stall is high, then check the previous access's words.
  task automatic step(input logic [31:0] p, input bit re, input logic [3:0] we,
                      input logic [31:0] a, input logic [31:0] d, input logic [31:0] dp);
    exp_e        qd_kind;
    logic [31:0] qi_exp, qd_exp;
    bit          qi_chk;
    @(negedge clk);
    qi_chk = pi_chk; qi_exp = pi_exp; qd_kind = pd_kind; qd_exp = pd_exp;
    present(p, re, we, a, d, dp);
    #1;
    while (stall) begin @(negedge clk); #1; end
    if (qi_chk) check(instr == qi_exp, "fetched word");
    if (qd_kind == E_VAL) check(data_dout == qd_exp, "loaded word");
    if (qd_kind == E_IO)  check(data_dout == io_exp, "counter value");
  endtask

  task automatic present(input logic [31:0] p, input bit re, input logic [3:0] we,
                         input logic [31:0] a, input logic [31:0] d, input logic [31:0] dp);
    pc = p; data_re = re; data_we = we; data_addr = a; data_din = d; data_pc = dp;
    pi_chk = (p[31:28] == 4'h4 || p[31:28] == 4'h1) &&
             !(we != 0 && a[31:29] == 3'b001 && dp[30]);
    pi_exp = fetch_exp(p);
    if (p[31:28] == 4'h4) m_bios_fetch++;
    pd_kind = E_NONE;
    if (re) begin
      if (a[31:28] == 4'h4) begin pd_kind = E_VAL; pd_exp = bios_word(32'(a[13:2])); m_bios_load++; end
      if (a[31:28] inside {4'h1, 4'h3}) begin pd_kind = E_VAL; pd_exp = ref_rd(a); end
      if (a == IO_CYCLE_CNT || a == IO_INSTR_CNT) pd_kind = E_IO;
      if (a == IO_UART_RX_DATA) begin pd_kind = E_VAL; pd_exp = {24'b0, uart_rx_data}; end
    end
    if (we != 0 && a[31:28] inside {4'h1, 4'h3}) ref_mem[32'(a[27:2])] = merge(ref_rd(a), d, we);
    if (we != 0 && a[31:28] inside {4'h2, 4'h3} && dp[30]) m_icache_write++;
    if (we != 0 && a[31:28] == 4'h2 && !dp[30]) m_pc30_block++;
  endtask

  localparam logic [31:0] PROG = 32'h1000_4000;   // program copied here (through 0x3...)
  localparam int          PROG_WORDS = 1024;
  logic [31:0] bpc;

  initial begin
    for (int i = 0; i < BIOS_WORDS; i++) dut.u_bios.rom[i] = bios_word(32'(i));
    pc = 32'h4000_0000; data_re = 0; data_we = 0; data_addr = 0; data_din = 0; data_pc = 0;
    pi_chk = 0; pd_kind = E_NONE;
    uart_tx_ready = 1; uart_rx_valid = 1; uart_rx_data = 8'hC3;
    repeat (4) @(posedge clk); #1 rst = 0; ddr_rst = 0;

    // 1. boot: run from the BIOS, load constants from it, clear the counters
    bpc = 32'h4000_0000;
    step(bpc, 0, 4'hF, IO_CNT_RESET, 0, bpc);
    for (int i = 0; i < 64; i++) begin
      bpc += 4;
      step(bpc, 1, 0, 32'h4000_0800 + 32'(4 * i), 0, bpc);
    end
    // 2. copy a program into 0x3..., which fills both caches' backing store
    for (int i = 0; i < PROG_WORDS; i++) begin
      bpc += 4;
      step(bpc, 0, 4'hF, PROG + 32'h2000_0000 + 32'(4 * i), $urandom, bpc);
    end
    // a store to 0x2 from outside the BIOS: must not reach the instruction cache
    step(32'h1000_4000, 0, 4'hF, 32'h2000_4000, 32'hDEAD_BEEF, 32'h1000_0000);
    // 3. run the program: fetches from the instruction cache, data through the data cache
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < PROG_WORDS; i++) begin
        logic [31:0] p, a;
        p = PROG + 32'(4 * i);
        case ($urandom % 5)
          0: step(p, 1, 0, 32'h1000_0000 | ($urandom % 32768) & ~32'h3, 0, p);     // load
          1: step(p, 0, 4'($urandom % 15 + 1), 32'h1000_0000 | ($urandom % 16384) & ~32'h3,
                  $urandom, p);                                                     // store
          2: step(p, 1, 0, PROG + 32'(4 * ($urandom % PROG_WORDS)), 0, p);         // read own code
          3: step(p, 1, 0, 32'h4000_0000 | ($urandom % 16384) & ~32'h3, 0, p);     // BIOS constant
          default: step(p, 0, 0, 0, 0, p);
        endcase
      end
    end
    // 4. I/O: UART and counters
    a_io: begin
      logic [31:0] p;
      p = 32'h4000_0100;
      step(p, 1, 0, IO_UART_TX_CTRL, 0, p);
      step(p + 4, 0, 4'h1, IO_UART_TX_DATA, 32'h5A, p + 4);
      step(p + 8, 1, 0, IO_UART_RX_DATA, 0, p + 8);
      step(p + 12, 1, 0, IO_CYCLE_CNT, 0, p + 12);
      step(p + 16, 1, 0, IO_INSTR_CNT, 0, p + 16);
      step(p + 20, 0, 4'hF, IO_CNT_RESET, 0, p + 20);
      step(p + 24, 1, 0, IO_CYCLE_CNT, 0, p + 24);
      step(p + 28, 1, 0, IO_INSTR_CNT, 0, p + 28);
      step(p + 32, 0, 0, 0, 0, p + 32);
    end
    step(32'h4000_0200, 0, 0, 0, 0, 32'h4000_0200);
    $display("ddr_reads=%0d ddr_writes=%0d", n_reads, n_writes);
    $display("bios_fetch=%0d bios_load=%0d imiss=%0d dmiss=%0d both=%0d store_hit=%0d store_miss=%0d",
             m_bios_fetch, m_bios_load, m_imiss, m_dmiss, m_both, m_store_hit, m_store_miss);
    $display("wt_stall=%0d wdf_full=%0d icache_write=%0d pc30_block=%0d clear=%0d tx=%0d rx=%0d",
             m_wt_stall, m_wdf_full, m_icache_write, m_pc30_block, m_clear, m_tx, m_rx);
    check(m_bios_fetch > 0, "BIOS fetch");      check(m_bios_load > 0, "BIOS load");
    check(m_imiss > 0, "instruction miss");      check(m_dmiss > 0, "data miss");
    check(m_both > 0, "both caches busy");       check(m_store_hit > 0, "store hit");
    check(m_store_miss > 0, "store miss");       check(m_wt_stall > 0, "write-through stall");
    check(m_wdf_full > 0, "write FIFO full");    check(m_icache_write > 0, "icache write");
    check(m_pc30_block > 0, "PC[30] guard");     check(m_clear >= 2, "counter clear");
    check(m_tx == 1, "UART transmit");           check(m_rx == 1, "UART receive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
