// tb_request_controller: two requesters that follow the cache protocol (reads: one command
// then two data beats; writes: command with first beat, then the second beat) share the
// controller.  Simple single-clock FIFO stand-ins sit on the other side, with a responder
// that answers reads in order after a random delay.  Checks: every command reaches the
// address FIFO exactly once with its own port's address; the two beats of a write are
// adjacent in the write-data FIFO; every read beat is delivered to the port that asked,
// in order; both ports get reads in flight at the same time (interleaving) and both ask
// in the same cycle (arbitration) many times.
module tb_request_controller;
  import mem_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic [CMD_BITS-1:0]      c_af_cmd_din   [2];
  logic [DDR_ADDR_BITS-1:0] c_af_addr_din  [2];
  logic                     c_af_wr_en     [2];
  logic                     c_af_full      [2];
  logic [BEAT_BITS-1:0]     c_wdf_din      [2];
  logic [BEAT_BYTES-1:0]    c_wdf_mask_din [2];
  logic                     c_wdf_wr_en    [2];
  logic                     c_wdf_full     [2];
  logic [BEAT_BITS-1:0]     c_rdf_dout     [2];
  logic                     c_rdf_valid    [2];
  logic                     c_rdf_rd_en    [2];
  logic [CMD_BITS-1:0]      af_cmd_din;
  logic [DDR_ADDR_BITS-1:0] af_addr_din;
  logic af_wr_en, af_full, wdf_wr_en, wdf_full, rdf_valid, rdf_rd_en;
  logic [BEAT_BITS-1:0] wdf_din, rdf_dout;
  logic [BEAT_BYTES-1:0] wdf_mask_din;

  request_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // requesters: address encodes port and sequence number; data beats carry the same tag
  typedef enum {R_IDLE, R_WCMD, R_WB2, R_RCMD, R_RB0, R_RB1} rq_e;
  rq_e rs [2];
  int  seq [2];
  int  n_done [2];
  function automatic logic [30:0] tag_addr(input int p, input int s);
    return {6'b0, 1'(p), 22'(s), 2'b00};
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      c_af_addr_din[p]  = tag_addr(p, seq[p]);
      c_af_cmd_din[p]   = (rs[p] == R_WCMD) ? DDR_CMD_WRITE : DDR_CMD_READ;
      c_af_wr_en[p]     = (rs[p] == R_WCMD || rs[p] == R_RCMD);
      c_wdf_wr_en[p]    = (rs[p] == R_WCMD || rs[p] == R_WB2);
      c_wdf_din[p]      = {97'(seq[p]), 1'(rs[p] == R_WB2), 30'(p)};
      c_wdf_mask_din[p] = 16'(p);
      c_rdf_rd_en[p]    = (rs[p] == R_RB0 || rs[p] == R_RB1);
    end
  end

  // a random delay between operations keeps the ports out of step
  int gap [2];
  always @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < 2; p++) begin rs[p] <= R_IDLE; seq[p] <= 0; gap[p] <= 0; n_done[p] <= 0; end
    end else for (int p = 0; p < 2; p++) begin
      unique case (rs[p])
        R_IDLE: if (gap[p] > 0) gap[p] <= gap[p] - 1;
                else rs[p] <= ($urandom % 3 == 0) ? R_WCMD : R_RCMD;
        R_WCMD: if (!c_af_full[p] && !c_wdf_full[p]) rs[p] <= R_WB2;
        R_WB2:  if (!c_wdf_full[p]) begin rs[p] <= R_IDLE; seq[p] <= seq[p] + 1; n_done[p] <= n_done[p] + 1; gap[p] <= $urandom % 4; end
        R_RCMD: if (!c_af_full[p]) rs[p] <= R_RB0;
        R_RB0:  if (c_rdf_valid[p]) begin
                  check(c_rdf_dout[p] == {1'(p), 22'(seq[p]), 1'b0}, "read beat 0 routing");
                  rs[p] <= R_RB1;
                end
        R_RB1:  if (c_rdf_valid[p]) begin
                  check(c_rdf_dout[p] == {1'(p), 22'(seq[p]), 1'b1}, "read beat 1 routing");
                  rs[p] <= R_IDLE; seq[p] <= seq[p] + 1; n_done[p] <= n_done[p] + 1; gap[p] <= $urandom % 4;
                end
        default: ;
      endcase
    end
  end

  // FIFO stand-ins and DDR responder
  logic [30:0] rd_q [$];
  int beat = 0, delay = 0, n_inflight2 = 0, n_both_ask = 0, n_af_full = 0;
  logic expect_wb2 = 0;
  int   wb2_port;
  always @(negedge clk) begin
    af_full  = ($urandom % 5 == 0);
    wdf_full = ($urandom % 5 == 0);
  end
  assign rdf_valid = (rd_q.size() != 0) && delay == 0;
  assign rdf_dout  = (rd_q.size() != 0) ? 128'({rd_q[0][24:2], 1'(beat)}) : '0;

  always @(posedge clk) if (!rst) begin
    if (c_af_wr_en[0] && c_af_wr_en[1]) n_both_ask++;
    if (af_full) n_af_full++;
    check(!(af_wr_en && af_full), "write into full address FIFO");
    check(!(wdf_wr_en && wdf_full), "write into full data FIFO");
    if (af_wr_en) begin
      if (af_cmd_din == DDR_CMD_READ) rd_q.push_back(af_addr_din);
      else begin
        check(wdf_wr_en && wdf_din[30] == 0 && wdf_din[29:0] == 30'(af_addr_din[24]) &&
              wdf_mask_din == 16'(af_addr_din[24]), "write beat 1 with its command");
        check(!expect_wb2, "write beats split");
        expect_wb2 = 1; wb2_port = int'(af_addr_din[24]);
      end
    end else if (wdf_wr_en) begin
      check(expect_wb2 && wdf_din[30] == 1 && wdf_din[29:0] == 30'(wb2_port), "write beat 2");
      expect_wb2 = 0;
    end
    if (rd_q.size() >= 2 && rd_q[0][24] != rd_q[1][24]) n_inflight2++;
    if (rdf_valid && rdf_rd_en) begin
      if (beat == 1) begin beat = 0; void'(rd_q.pop_front()); end else beat = 1;
    end
    delay = ($urandom % 3 == 0) ? 1 + $urandom % 3 : 0;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (n_done[0] >= 2000 && n_done[1] >= 2000);
    @(posedge clk);
    $display("ops=%0d/%0d both_ask=%0d reads_in_flight_from_both=%0d", n_done[0], n_done[1],
             n_both_ask, n_inflight2);
    check(n_both_ask > 100, "arbitration exercised");
    check(n_inflight2 > 100, "read interleaving exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
