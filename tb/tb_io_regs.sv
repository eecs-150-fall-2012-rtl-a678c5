// tb_io_regs: random stalls and accesses to every I/O register.  The cycle counter must
// count every clock, the instruction counter every clock without stall, the clear must
// zero both; UART status and data read back with one cycle of latency, and the handshake
// pulses appear only for accesses made while the CPU is not stalled.
module tb_io_regs;
  import mem_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  logic stall, re, uart_tx_ready, uart_tx_valid, uart_rx_valid, uart_rx_ready;
  logic [31:0] addr, din, dout;
  logic [3:0] we;
  logic [7:0] uart_tx_data, uart_rx_data;

  io_regs dut (.*);

  int checks = 0, failures = 0, n_clear = 0, n_tx = 0, n_rx = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] cyc, ins, expect_q;
  logic        expect_valid;
  logic [31:0] regs [7];
  initial begin
    regs = '{IO_UART_TX_CTRL, IO_UART_RX_CTRL, IO_UART_TX_DATA, IO_UART_RX_DATA,
             IO_CYCLE_CNT, IO_INSTR_CNT, IO_CNT_RESET};
    stall = 0; re = 0; we = 0; addr = 0; din = 0; uart_tx_ready = 0; uart_rx_valid = 0;
    uart_rx_data = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    cyc = 0; ins = 0; expect_valid = 0;
    for (int n = 0; n < 5000; n++) begin
      // drive this cycle
      stall = ($urandom % 4 == 0);
      addr = regs[$urandom % 7];
      re = 0; we = 0;
      if (addr == IO_UART_TX_DATA || addr == IO_CNT_RESET) we = 4'hF; else re = 1;
      din = $urandom;
      uart_tx_ready = $urandom % 2; uart_rx_valid = $urandom % 2; uart_rx_data = 8'($urandom);
      #1;
      check(uart_tx_valid == (!stall && addr == IO_UART_TX_DATA), "tx valid pulse");
      check(!uart_tx_valid || uart_tx_data == din[7:0], "tx data");
      check(uart_rx_ready == (!stall && addr == IO_UART_RX_DATA), "rx ready pulse");
      if (uart_tx_valid) n_tx++;
      if (uart_rx_ready) n_rx++;
      if (!stall && re) begin
        expect_valid = 1;
        unique case (addr)
          IO_UART_TX_CTRL: expect_q = {31'b0, uart_tx_ready};
          IO_UART_RX_CTRL: expect_q = {31'b0, uart_rx_valid};
          IO_UART_RX_DATA: expect_q = {24'b0, uart_rx_data};
          IO_CYCLE_CNT:    expect_q = cyc;
          IO_INSTR_CNT:    expect_q = ins;
          default:         expect_q = 0;
        endcase
      end
      @(posedge clk); #1;
      if (!stall && we != 0 && addr == IO_CNT_RESET) begin cyc = 0; ins = 0; n_clear++; end
      else begin cyc++; if (!stall) ins++; end
      if (expect_valid) check(dout == expect_q, "read data");
    end
    check(n_clear > 50 && n_tx > 50 && n_rx > 50, "every register exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
