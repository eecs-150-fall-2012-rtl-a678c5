// tb_cache_tag_blk_ram: random writes and reads against an array model, one-cycle
// registered read, read-first on a collision, output held while re is low.
module tb_cache_tag_blk_ram;
  localparam int DEPTH = 256, WIDTH = 15;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [7:0] waddr, raddr;
  logic [14:0] wdata, rdata, model [DEPTH], expect_q;
  int checks = 0, failures = 0;

  cache_tag_blk_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    re = 1; we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = 8'(i); wdata = 15'($urandom); model[i] = wdata; @(posedge clk); #1;
    end
    for (int n = 0; n < 4000; n++) begin
      we = $urandom % 2 == 0; re = $urandom % 8 != 0;
      waddr = 8'($urandom); raddr = ($urandom % 4 == 0) ? waddr : 8'($urandom);
      wdata = 15'($urandom);
      if (re) expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
