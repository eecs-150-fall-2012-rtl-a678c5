// tb_mem_pkg: helpers shared by the testbenches: the initial contents of the DDR2 model
// and a reference of the whole memory seen by the CPU (DDR2 words as bytes).
package tb_mem_pkg;

  // Word that the DDR2 model returns at byte address a (word aligned, low 28 bits) before
  // anything was written there.
  function automatic logic [31:0] init_word(input logic [31:0] a);
    logic [31:0] w;
    w = {4'b0, a[27:2], 2'b00};
    return (w * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // The 128-bit beat holding the 16 bytes at beat index idx (byte address idx*16).
  function automatic logic [127:0] init_beat(input logic [31:0] idx);
    logic [127:0] b;
    for (int w = 0; w < 4; w++) b[32*w +: 32] = init_word({idx[27:0], 4'b0} + 32'(4 * w));
    return b;
  endfunction

  // Merge a store into a word: byte i of new data where we[i] is set.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] we);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = we[i] ? nw[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

endpackage
