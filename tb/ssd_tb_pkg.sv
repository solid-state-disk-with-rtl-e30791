// ssd_tb_pkg: reference functions shared by the testbenches.
//
// Unwritten NAND flash holds a fixed pattern, a function of the SSD page
// number and the byte offset, so that every testbench can work out the
// data it expects without reading the models.
package ssd_tb_pkg;

  function automatic logic [7:0] flash_byte(input int unsigned page, input int unsigned b);
    return 8'((page * 32'h5b) ^ (b * 32'h1d) ^ (b >> 8) ^ 32'ha5);
  endfunction

  // 64-bit word w of an SSD page, bytes packed lowest first.
  function automatic logic [63:0] flash_word(input int unsigned page, input int unsigned w);
    logic [63:0] r;
    for (int i = 0; i < 8; i++) r[8*i +: 8] = flash_byte(page, 8 * w + i);
    return r;
  endfunction

endpackage
