// tb_mem_decode: random fetch and data addresses over every nibble of the memory map.
// Each target is a stand-in that answers one cycle later with a word made from its own
// name and the address it saw.  Checks the enables and write masks each target gets, the
// PC[30] rule for instruction-cache writes, and which word reaches instr and data_dout.
module tb_mem_decode;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic stall;
  logic [31:0] pc, instr, data_addr, data_din, data_pc, data_dout;
  logic data_re;
  logic [3:0] data_we;
  logic [31:0] icache_addr, icache_din, icache_dout, dcache_addr, dcache_din, dcache_dout;
  logic icache_re, dcache_re, bios_ena, bios_enb, io_re;
  logic [3:0] icache_we, dcache_we, io_we;
  logic [31:0] bios_addra, bios_douta, bios_addrb, bios_doutb, io_addr, io_din, io_dout;

  mem_decode dut (.*);

  // stand-ins: one-cycle answer, held while stalled
  always_ff @(posedge clk) if (!stall) begin
    icache_dout <= 32'h1000_0000 ^ icache_addr;
    dcache_dout <= 32'h2000_0000 ^ dcache_addr;
    io_dout     <= 32'h3000_0000 ^ io_addr;
  end
  always_ff @(posedge clk) begin
    if (bios_ena) bios_douta <= 32'h4000_0000 ^ bios_addra;
    if (bios_enb) bios_doutb <= 32'h5000_0000 ^ bios_addrb;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] e_instr, e_data;
  int n_iwrite = 0, n_iwrite_blocked = 0;
  initial begin
    stall = 0; pc = 32'h4000_0000; data_addr = 0; data_re = 0; data_we = 0; data_din = 0;
    data_pc = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    e_instr = 0; e_data = 0;
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] pn, dn;
      logic st;
      pn = ($urandom % 2) ? 4'h1 : (($urandom % 2) ? 4'h4 : 4'($urandom));
      dn = 4'($urandom % 10);
      if (dn == 9) dn = 4'h8;
      pc = {pn, 26'($urandom), 2'b00};
      data_addr = {dn, 26'($urandom), 2'b00};
      st = ($urandom % 3 == 0);
      data_we = st ? 4'($urandom % 15 + 1) : 4'b0;
      data_re = !st && ($urandom % 4 != 0);
      data_din = $urandom;
      data_pc = {($urandom % 2) ? 4'h4 : 4'h1, 28'($urandom)};
      stall = ($urandom % 5 == 0);
      #1;
      // routing
      check(dcache_we == (dn inside {4'h1, 4'h3} ? data_we : 4'b0), "dcache write mask");
      check(dcache_re == (data_re && dn inside {4'h1, 4'h3}), "dcache read enable");
      check(icache_we == ((st && dn inside {4'h2, 4'h3} && data_pc[30]) ? data_we : 4'b0),
            "icache write mask");
      if (icache_we != 0) begin
        n_iwrite++;
        check(icache_addr == data_addr && icache_din == data_din && !icache_re, "icache write port");
      end else begin
        if (st && dn inside {4'h2, 4'h3}) n_iwrite_blocked++;
        check(icache_re == (pn == 4'h1) && icache_addr == pc, "icache fetch");
      end
      check(io_we == (dn == 4'h8 ? data_we : 4'b0) && io_re == (data_re && dn == 4'h8), "io enables");
      check(bios_enb == (!stall && data_re && dn == 4'h4), "bios data enable");
      check(bios_ena == (!stall && pn == 4'h4), "bios fetch enable");
      if (!stall) begin
        e_instr = (icache_we == 0 && pn == 4'h1) ? (32'h1000_0000 ^ pc) :
                  (pn == 4'h4) ? (32'h4000_0000 ^ pc) : 32'h0;
        e_data  = !data_re ? 32'h0 :
                  dn inside {4'h1, 4'h3} ? (32'h2000_0000 ^ data_addr) :
                  (dn == 4'h4) ? (32'h5000_0000 ^ data_addr) :
                  (dn == 4'h8) ? (32'h3000_0000 ^ data_addr) : 32'h0;
      end
      @(posedge clk); #1;
      check(instr == e_instr, "instr mux");
      check(data_dout == e_data, "data mux");
    end
    check(n_iwrite > 50 && n_iwrite_blocked > 50, "PC[30] rule exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
