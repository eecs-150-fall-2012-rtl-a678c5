// tb_cache_data_blk_ram: random byte-masked writes and reads against an array model;
// checks the one-cycle read latency and read-first behaviour on a collision.
module tb_cache_data_blk_ram;
  localparam int DEPTH = 512, WIDTH = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0] waddr, raddr;
  logic [15:0] wbe;
  logic [127:0] wdata, rdata, model [DEPTH], expect_q;
  logic re;
  int checks = 0, failures = 0;

  cache_data_blk_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    re = 1; wbe = '1;
    for (int i = 0; i < DEPTH; i++) begin   // fill
      waddr = 9'(i); wdata = {4{$urandom}}; model[i] = wdata; @(posedge clk); #1;
    end
    wbe = '0;
    for (int n = 0; n < 4000; n++) begin
      waddr = 9'($urandom); raddr = ($urandom % 4 == 0) ? waddr : 9'($urandom);
      wbe = 16'($urandom); wdata = {$urandom, $urandom, $urandom, $urandom};
      expect_q = model[raddr];              // read-first: old contents
      for (int b = 0; b < 16; b++) if (wbe[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: %h vs %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
