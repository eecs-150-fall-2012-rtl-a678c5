// tb_async_fifo: 50 MHz writer and 200 MHz reader (and the reverse), random enables;
// every word must come out once, in order; full must stop writes at DEPTH words.
module tb_async_fifo;
  localparam int W = 40, D = 16;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en, rd_en, full, valid;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0, n_full = 0, n_out = 0;
  logic [W-1:0] q [$];
  bit fast_write = 0;

  always #(fast_write ? 2.5 : 10) wclk = ~wclk;
  always #(fast_write ? 10 : 2.5) rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  int unsigned wpct = 70;
  initial begin
    wr_en = 0; din = '0;
    repeat (4) @(posedge wclk); wrst = 0;
    forever begin
      @(posedge wclk); #0.1;
      if (wr_en && !full_at_edge) q.push_back(din);
      wr_en = ($urandom % 100) < wpct;
      din   = {$urandom, 8'($urandom)};
    end
  end
  logic full_at_edge;
  always @(posedge wclk) full_at_edge <= full;
  always @(negedge wclk) if (full) n_full++;

  // reader
  int unsigned rpct = 70;
  initial begin
    rd_en = 0;
    repeat (4) @(posedge rclk); rrst = 0;
  end
  always @(posedge rclk) begin
    if (!rrst && rd_en && valid) begin
      checks++; n_out++;
      if (q.size() == 0 || dout !== q[0]) begin
        failures++;
        if (failures < 5) $display("bad word %h", dout);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
    rd_en <= ($urandom % 100) < rpct;
  end

  initial begin
    #20000;  rpct = 5;          // slow reader: the FIFO fills
    #20000;  rpct = 90;  wpct = 30;
    #20000;  fast_write = 1; rpct = 80; wpct = 80;
    #20000;  rpct = 2;
    #20000;  rpct = 95;  wpct = 0;
    #10000;
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words lost", q.size()); end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never became full"); end
    $display("words=%0d full_cycles=%0d", n_out, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
