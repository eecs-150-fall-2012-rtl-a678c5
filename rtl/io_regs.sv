// io_regs: the memory-mapped I/O page (address nibble 4'b1000): UART status and data
// registers, and the two benchmarking counters used to measure CPI.
//
//   0x80000000  read   {31'b0, DataInReady}   UART transmitter can take a byte
//   0x80000004  read   {31'b0, DataOutValid}  UART receiver holds a byte
//   0x80000008  write  {24'b0, DataIn}        byte to transmit (pulses DataInValid)
//   0x8000000C  read   {24'b0, DataOut}       received byte (pulses DataOutReady)
//   0x80000010  read   cycle counter: +1 every clock cycle
//   0x80000014  read   instruction counter: +1 every cycle the CPU is not stalled
//   0x80000018  write  clears both counters
//
// An access is presented with the CPU's other memory signals and takes effect in the cycle
// the pipeline advances (`stall` low); read data appears one cycle later, like a block RAM,
// and is held while the CPU is stalled.  The register map and the counting rules follow the
// document; the one-cycle handshake pulses toward the UART and the priority of a clear over
// a count in the same cycle are this design's choices.
module io_regs
  import mem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,       // CPU pipeline frozen
  input  logic [31:0] addr,
  input  logic        re,          // a load from the I/O page
  input  logic [3:0]  we,          // a store to the I/O page
  input  logic [31:0] din,
  output logic [31:0] dout,
  // UART (transmit side: DataIn*; receive side: DataOut*)
  input  logic        uart_tx_ready,   // DataInReady
  output logic [7:0]  uart_tx_data,    // DataIn
  output logic        uart_tx_valid,   // DataInValid
  input  logic        uart_rx_valid,   // DataOutValid
  input  logic [7:0]  uart_rx_data,    // DataOut
  output logic        uart_rx_ready    // DataOutReady
);

  logic [31:0] cycle_cnt, instr_cnt;
  logic        do_rd, do_wr, clr;

  assign do_rd = re && !stall;
  assign do_wr = (we != 4'b0) && !stall;
  assign clr   = do_wr && (addr == IO_CNT_RESET);

  assign uart_tx_valid = do_wr && (addr == IO_UART_TX_DATA);
  assign uart_tx_data  = din[7:0];
  assign uart_rx_ready = do_rd && (addr == IO_UART_RX_DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      cycle_cnt <= '0;
      instr_cnt <= '0;
      dout      <= '0;
    end else begin
      if (clr) begin
        cycle_cnt <= '0;
        instr_cnt <= '0;
      end else begin
        cycle_cnt <= cycle_cnt + 1'b1;
        if (!stall) instr_cnt <= instr_cnt + 1'b1;
      end
      if (do_rd) begin
        unique case (addr)
          IO_UART_TX_CTRL: dout <= {31'b0, uart_tx_ready};
          IO_UART_RX_CTRL: dout <= {31'b0, uart_rx_valid};
          IO_UART_RX_DATA: dout <= {24'b0, uart_rx_data};
          IO_CYCLE_CNT:    dout <= cycle_cnt;
          IO_INSTR_CNT:    dout <= instr_cnt;
          default:         dout <= '0;
        endcase
      end
    end
  end

endmodule
