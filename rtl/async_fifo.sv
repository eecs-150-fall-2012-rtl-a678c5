// async_fifo: clock-crossing FIFO, used three times between the CPU clock (50 MHz) and
// the DDR2 controller clock (200 MHz): as the address/command FIFO (mig_af), the write-data
// FIFO (mig_wdf) and the read-data FIFO (mig_rdf).
//
// Classic dual-clock design: binary read and write pointers, one bit wider than the
// address, are converted to Gray code and passed through two flip-flops into the other
// clock domain.  `full` is computed in the write domain, `valid` (not empty) in the read
// domain; both are pessimistic by the synchroniser delay, never wrong.  The read side is
// first-word-fall-through: `dout` shows the oldest word whenever `valid` is high, and a
// cycle with `rd_en && valid` removes it.  A write with `wr_en && !full` stores `din`.
// Writes while full and reads while empty are ignored.
// The document gives the FIFOs' purpose and clock rates; depth, Gray-code pointers and the
// fall-through read port are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16      // power of two
) (
  // write side
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  // read side
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             valid
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic do_write;
  assign do_write = wr_en && !full;
  assign full     = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read domain
  logic do_read;
  assign valid   = (rgray != wgray_r2);
  assign do_read = rd_en && valid;
  assign dout    = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_read) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  initial begin
    assert (DEPTH >= 4 && (1 << AW) == DEPTH)
      else $error("async_fifo: DEPTH must be a power of two, at least 4");
  end

endmodule
