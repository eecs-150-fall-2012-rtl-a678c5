// mig_model: behavioural model of the DDR2 memory controller and the DDR2 module behind
// it, seen from the controller ends of the three clock-crossing FIFOs.  Not synthesizable.
//
// It takes one command at a time from the address FIFO.  A write (3'b000) then takes two
// 128-bit beats from the write-data FIFO and stores every byte whose active-low mask bit is
// 0.  A read (3'b001) waits READ_LAT cycles and pushes the two beats of the burst into the
// read-data FIFO, low half first.  Addresses count 64-bit words, so the beat index is
// address/2.  Locations never written read as tb_mem_pkg::init_beat.  With PAUSE_PCT > 0
// the model sometimes stops taking commands for PAUSE_LEN cycles (as during a refresh),
// which lets the FIFOs fill up.
module mig_model
  import mem_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter int unsigned READ_LAT  = 6,
  parameter int unsigned PAUSE_PCT = 0,
  parameter int unsigned PAUSE_LEN = 60
) (
  input  logic                     ddr_clk,
  input  logic                     ddr_rst,
  input  logic [CMD_BITS-1:0]      af_cmd,
  input  logic [DDR_ADDR_BITS-1:0] af_addr,
  input  logic                     af_valid,
  output logic                     af_rd_en,
  input  logic [BEAT_BITS-1:0]     wdf_data,
  input  logic [BEAT_BYTES-1:0]    wdf_mask,
  input  logic                     wdf_valid,
  output logic                     wdf_rd_en,
  output logic [BEAT_BITS-1:0]     rdf_data,
  output logic                     rdf_wr_en,
  input  logic                     rdf_full,
  output int                       n_reads,
  output int                       n_writes,
  output int                       n_pauses
);

  typedef enum logic [2:0] {M_IDLE, M_W0, M_W1, M_RLAT, M_R0, M_R1, M_PAUSE} mstate_e;
  mstate_e st;
  logic [BEAT_BITS-1:0] mem [logic [31:0]];
  logic [31:0] beat0;
  int unsigned cnt;

  function automatic logic [BEAT_BITS-1:0] rd(input logic [31:0] idx);
    return mem.exists(idx) ? mem[idx] : init_beat(idx);
  endfunction

  always_comb begin
    af_rd_en  = (st == M_IDLE) && af_valid;
    wdf_rd_en = (st == M_W0 || st == M_W1) && wdf_valid;
    rdf_wr_en = (st == M_R0 || st == M_R1) && !rdf_full;
    rdf_data  = rd(beat0 + ((st == M_R1) ? 32'd1 : 32'd0));
  end

  always @(posedge ddr_clk) begin
    if (ddr_rst) begin
      st <= M_IDLE; cnt <= 0; beat0 <= '0;
      n_reads <= 0; n_writes <= 0; n_pauses <= 0;
    end else begin
      unique case (st)
        M_IDLE: if (af_valid) begin
          beat0 <= {1'b0, af_addr} >> 1;
          st    <= (af_cmd == DDR_CMD_WRITE) ? M_W0 : M_RLAT;
          cnt   <= 0;
        end else if (PAUSE_PCT != 0 && ($urandom % 1000) < PAUSE_PCT) begin
          st <= M_PAUSE; cnt <= 0; n_pauses <= n_pauses + 1;
        end
        M_W0, M_W1: if (wdf_valid) begin
          logic [31:0] idx;
          logic [BEAT_BITS-1:0] b;
          idx = beat0 + ((st == M_W1) ? 32'd1 : 32'd0);
          b = rd(idx);
          for (int i = 0; i < BEAT_BYTES; i++) if (!wdf_mask[i]) b[8*i +: 8] = wdf_data[8*i +: 8];
          mem[idx] = b;
          if (st == M_W1) n_writes <= n_writes + 1;
          st <= (st == M_W0) ? M_W1 : M_IDLE;
        end
        M_RLAT: begin
          cnt <= cnt + 1;
          if (cnt + 1 >= READ_LAT) st <= M_R0;
        end
        M_R0: if (!rdf_full) st <= M_R1;
        M_R1: if (!rdf_full) begin st <= M_IDLE; n_reads <= n_reads + 1; end
        M_PAUSE: begin
          cnt <= cnt + 1;
          if (cnt + 1 >= PAUSE_LEN) st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
