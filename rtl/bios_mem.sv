// bios_mem: dual-port read-only memory holding the boot program (BIOS).
//
// Port A serves instruction fetches, port B data loads (the program's constant data lives in
// the same image).  Both ports are synchronous like a block RAM: address and enable in cycle
// t, word out in cycle t+1; with the enable low the output register keeps its word, which
// lets the CPU freeze during a stall.  The word address is byte address bits [AW+1:2].  The
// contents come from a hex file named by INIT_FILE (one 32-bit word per line); with an empty
// name the memory reads as zero.
// The dual-port read-only organisation is the document's; the 16 KB depth is this design's
// choice, as the document gives none.
module bios_mem #(
  parameter int unsigned DEPTH     = 4096,   // 32-bit words
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic [$clog2(DEPTH)-1:0] addra,
  output logic [31:0]              douta,
  input  logic                     enb,
  input  logic [$clog2(DEPTH)-1:0] addrb,
  output logic [31:0]              doutb
);

  logic [31:0] rom [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
    else for (int i = 0; i < DEPTH; i++) rom[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (ena) douta <= rom[addra];
    if (enb) doutb <= rom[addrb];
  end

endmodule
