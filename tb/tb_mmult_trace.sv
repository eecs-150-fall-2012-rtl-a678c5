// tb_mmult_trace: runs the memory traffic of the system's benchmark, S = A x B for two
// 64 x 64 matrices of 32-bit words, through the full memory system at its default sizes.
// A CPU stand-in plays the part of the program: a 16-instruction inner loop fetched from
// the instruction cache (the loop body is first copied into the 0x3 segment from the
// BIOS), two loads per multiply-accumulate through the data cache, and one store per
// result element.  The products are formed in the testbench from the loaded words, so a
// wrong load gives a wrong S.  At the end S is read back through the data cache and
// compared with a product computed directly, and the cycle and instruction counters are
// read through the I/O page to report cycles per instruction.
// Matrix contents: A[i][j] = i + 2j + 1, B[i][j] = 3i - j + 7 (this testbench's choice).
module tb_mmult_trace;
  import mem_pkg::*;
  import tb_mem_pkg::*;

  localparam int N = 64;
  localparam logic [31:0] A_BASE = 32'h1001_0000;
  localparam logic [31:0] B_BASE = 32'h1002_0000;
  localparam logic [31:0] S_BASE = 32'h1003_0000;
  localparam logic [31:0] LOOP   = 32'h1000_8000;   // inner loop code

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
  mig_model #(.READ_LAT(8)) mig (
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
    repeat (8000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] a_val(int i, int j); return 32'(i + 2 * j + 1); endfunction
  function automatic logic [31:0] b_val(int i, int j); return 32'(3 * i - j + 7); endfunction
  function automatic logic [31:0] code_word(int i); return 32'h2408_0000 | 32'(i); endfunction

  // CPU stand-in: present in the cycle after the previous access was taken, hold while
  // stalled, then hand back the previous access's loaded word and fetched word.
  logic [31:0] last_load, last_instr;
  logic [31:0] exp_instr, prev_exp_instr;
  bit          chk_instr, prev_chk_instr;
  task automatic step(input logic [31:0] p, input bit re, input logic [3:0] we,
                      input logic [31:0] a, input logic [31:0] d, input logic [31:0] dp);
    @(negedge clk);
    prev_chk_instr = chk_instr; prev_exp_instr = exp_instr;
    pc = p; data_re = re; data_we = we; data_addr = a; data_din = d; data_pc = dp;
    chk_instr = (p[31:28] == 4'h1);
    exp_instr = code_word(int'(p[5:2]));
    #1;
    while (stall) begin @(negedge clk); #1; end
    last_load  = data_dout;
    last_instr = instr;
    if (prev_chk_instr) check(instr == prev_exp_instr, "fetched loop instruction");
  endtask

  int          n_fetch = 0;
  logic [31:0] lpc;
  // one instruction of the inner loop, with its data access
  task automatic inst(input bit re, input logic [3:0] we, input logic [31:0] a,
                      input logic [31:0] d);
    lpc = LOOP + 32'(4 * (n_fetch % 16));
    n_fetch++;
    step(lpc, re, we, a, d, lpc);
  endtask

  logic [31:0] s_ref [N][N];
  logic [31:0] acc, va, vb, cyc, ins, checksum;
  int          n_miss_i, n_miss_d;
  always @(posedge clk) if (!rst) begin
    if (dut.u_mem.u_icache.state == dut.u_mem.u_icache.S_RD_REQ) n_miss_i++;
    if (dut.u_mem.u_dcache.state == dut.u_mem.u_dcache.S_RD_REQ) n_miss_d++;
  end

  initial begin
    pc = 32'h4000_0000; data_re = 0; data_we = 0; data_addr = 0; data_din = 0; data_pc = 0;
    chk_instr = 0; exp_instr = 0; n_miss_i = 0; n_miss_d = 0;
    uart_tx_ready = 1; uart_rx_valid = 0; uart_rx_data = 0;
    repeat (4) @(posedge clk); #1 rst = 0; ddr_rst = 0;

    // boot: copy the loop into 0x3 and the matrices into memory, running from the BIOS
    for (int i = 0; i < 16; i++)
      step(32'h4000_0000 + 32'(4 * i), 0, 4'hF, LOOP + 32'h2000_0000 + 32'(4 * i), code_word(i), 32'h4000_0000);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        step(32'h4000_0100, 0, 4'hF, A_BASE + 32'(4 * (N * i + j)), a_val(i, j), 32'h4000_0100);
        step(32'h4000_0104, 0, 4'hF, B_BASE + 32'(4 * (N * i + j)), b_val(i, j), 32'h4000_0104);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        s_ref[i][j] = 0;
        for (int k = 0; k < N; k++) s_ref[i][j] += a_val(i, k) * b_val(k, j);
      end

    // the benchmark proper, timed with the counters
    inst(0, 4'hF, IO_CNT_RESET, 0);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        acc = 0;
        for (int k = 0; k < N; k++) begin
          inst(1, 0, A_BASE + 32'(4 * (N * i + k)), 0);
          inst(1, 0, B_BASE + 32'(4 * (N * k + j)), 0);
          va = last_load;                         // word loaded by the first of the two
          inst(0, 0, 0, 0);                       // multiply
          vb = last_load;
          acc += va * vb;
          inst(0, 0, 0, 0);                       // add, loop control
        end
        inst(0, 4'hF, S_BASE + 32'(4 * (N * i + j)), acc);
      end
    inst(1, 0, IO_CYCLE_CNT, 0);
    inst(1, 0, IO_INSTR_CNT, 0);
    cyc = last_load;
    inst(0, 0, 0, 0);
    ins = last_load;

    // read S back and compare
    checksum = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        step(32'h4000_0200, 1, 0, S_BASE + 32'(4 * (N * i + j)), 0, 32'h4000_0200);
        step(32'h4000_0204, 0, 0, 0, 0, 32'h4000_0204);
        check(last_load == s_ref[i][j], "S element");
        checksum += last_load;
      end
    $display("mmult %0dx%0d: cycles=%0d instructions=%0d CPI=%0d.%03d icache_misses=%0d dcache_misses=%0d checksum=%h",
             N, N, cyc, ins, cyc / ins, (1000 * (cyc % ins)) / ins, n_miss_i, n_miss_d, checksum);
    check(ins == 32'(N * N * (4 * N + 1) + 1), "instruction count");
    check(cyc > ins, "misses cost cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
