// mem_decode: the CPU's address decoder for the cached memory map.  It steers the
// instruction fetch (by the PC) and each data access (by its address) to the instruction
// cache, the data cache, the BIOS memory or the I/O page, by address bits [31:28]:
//
//   nibble   fetch (PC)          data access
//   0001     instruction cache   data cache, read/write
//   0010     -                   instruction cache, write only, if the store's PC[30] = 1
//   0011     -                   data cache and instruction cache (write; icache only if
//                                PC[30] = 1), so a program stored here is seen by both
//   0100     BIOS memory         BIOS memory, read only
//   1000     -                   I/O, read/write
//
// Every target answers one cycle after the request, so the decoder registers which target
// each port used and selects the returning word with it; the registers hold while the CPU
// is stalled.  When the instruction cache is written its address comes from the data side;
// a fetch from the instruction cache in that same cycle is dropped (it cannot occur when the
// store runs from the BIOS and the next fetch also does).  An access to an unmapped nibble,
// a store to the BIOS or a load from nibble 0010 does nothing and reads as zero.
// The map is the document's; the drop rule and the zero for unmapped reads are this
// design's choices.
module mem_decode
  import mem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  // CPU side
  input  logic [31:0] pc,          // fetch address
  output logic [31:0] instr,       // fetched word, one cycle later
  input  logic [31:0] data_addr,
  input  logic        data_re,
  input  logic [3:0]  data_we,
  input  logic [31:0] data_din,
  input  logic [31:0] data_pc,     // PC of the instruction making the data access
  output logic [31:0] data_dout,   // loaded word, one cycle later
  // instruction cache
  output logic [31:0] icache_addr,
  output logic        icache_re,
  output logic [3:0]  icache_we,
  output logic [31:0] icache_din,
  input  logic [31:0] icache_dout,
  // data cache
  output logic [31:0] dcache_addr,
  output logic        dcache_re,
  output logic [3:0]  dcache_we,
  output logic [31:0] dcache_din,
  input  logic [31:0] dcache_dout,
  // BIOS memory: port A fetches, port B loads (byte addresses; the memory picks its bits)
  output logic        bios_ena,
  output logic [31:0] bios_addra,
  input  logic [31:0] bios_douta,
  output logic        bios_enb,
  output logic [31:0] bios_addrb,
  input  logic [31:0] bios_doutb,
  // I/O page
  output logic [31:0] io_addr,
  output logic        io_re,
  output logic [3:0]  io_we,
  output logic [31:0] io_din,
  input  logic [31:0] io_dout
);

  typedef enum logic [1:0] {F_NONE, F_ICACHE, F_BIOS}         fsel_e;
  typedef enum logic [1:0] {D_NONE, D_DCACHE, D_BIOS, D_IO}   dsel_e;

  logic [3:0] pnib, dnib;
  assign pnib = pc[31:28];
  assign dnib = data_addr[31:28];

  logic d_store, i_write, d_dcache;
  assign d_store  = (data_we != 4'b0);
  assign i_write  = d_store && (dnib[3:1] == 3'b001) && data_pc[30];
  assign d_dcache = (dnib[3:2] == 2'b00) && dnib[0];          // 4'b00x1

  fsel_e fsel, fsel_q;
  dsel_e dsel, dsel_q;

  always_comb begin
    // instruction cache: written from the data side, otherwise read by the PC
    icache_addr = i_write ? data_addr : pc;
    icache_we   = i_write ? data_we : 4'b0;
    icache_din  = data_din;
    icache_re   = !i_write && (pnib == NIB_ICACHE_PC);

    dcache_addr = data_addr;
    dcache_din  = data_din;
    dcache_re   = data_re && d_dcache;
    dcache_we   = d_dcache ? data_we : 4'b0;

    bios_addra  = pc;
    bios_ena    = !stall && (pnib == NIB_BIOS);
    bios_addrb  = data_addr;
    bios_enb    = !stall && data_re && (dnib == NIB_BIOS);

    io_addr     = data_addr;
    io_din      = data_din;
    io_re       = data_re && (dnib == NIB_IO);
    io_we       = (dnib == NIB_IO) ? data_we : 4'b0;

    if (icache_re)              fsel = F_ICACHE;
    else if (pnib == NIB_BIOS)  fsel = F_BIOS;
    else                        fsel = F_NONE;

    if (!data_re)                dsel = D_NONE;
    else if (d_dcache)           dsel = D_DCACHE;
    else if (dnib == NIB_BIOS)   dsel = D_BIOS;
    else if (dnib == NIB_IO)     dsel = D_IO;
    else                         dsel = D_NONE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fsel_q <= F_NONE;
      dsel_q <= D_NONE;
    end else if (!stall) begin
      fsel_q <= fsel;
      dsel_q <= dsel;
    end
  end

  always_comb begin
    unique case (fsel_q)
      F_ICACHE: instr = icache_dout;
      F_BIOS:   instr = bios_douta;
      default:  instr = '0;
    endcase
    unique case (dsel_q)
      D_DCACHE: data_dout = dcache_dout;
      D_BIOS:   data_dout = bios_doutb;
      D_IO:     data_dout = io_dout;
      default:  data_dout = '0;
    endcase
  end

endmodule
