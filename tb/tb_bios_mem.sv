// tb_bios_mem: loads tb/bios_test.hex (64 words, word i = (i * 0x9E3779B1) ^ 0x0BADF00D)
// and reads both ports at random, checking the one-cycle latency and that a port with its
// enable low keeps its last word.
module tb_bios_mem;
  logic clk = 0;
  always #10 clk = ~clk;
  logic ena, enb;
  logic [5:0] addra, addrb;
  logic [31:0] douta, doutb, ea, eb;
  int checks = 0, failures = 0;

  bios_mem #(.DEPTH(64), .INIT_FILE("tb/bios_test.hex")) dut (.*);

  function automatic logic [31:0] word(input int i);
    return (32'(i) * 32'h9E37_79B1) ^ 32'h0BAD_F00D;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ena = 1; enb = 1; addra = 0; addrb = 0;
    @(posedge clk); #1;
    ea = word(0); eb = word(0);
    for (int n = 0; n < 2000; n++) begin
      ena = ($urandom % 4 != 0); enb = ($urandom % 4 != 0);
      addra = 6'($urandom); addrb = 6'($urandom);
      if (ena) ea = word(addra);
      if (enb) eb = word(addrb);
      @(posedge clk); #1;
      checks += 2;
      if (douta !== ea) failures++;
      if (doutb !== eb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
