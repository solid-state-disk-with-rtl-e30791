// tb_ssd_controller: checks the whole SSD from its DDR pins, with four
// NAND flash models on its channels and the host played by the testbench.
//
// Checked: read bursts that miss the cache buffer (long wait for DQS, data
// from flash) and that hit it (short wait), a whole-page write that ends in
// irq and reaches the flash of the right channel, a read that finds the
// written page in the buffer, and one that finds it in flash after it was
// evicted; also the processor port of the SRAM.
module tb_ssd_controller;
  import ssd_pkg::*;
  localparam int unsigned PB = 256, WPP = PB / 8, LINES = 4, CH = 4, PRE = 2;
  localparam int unsigned SRAM_WORDS = 1024;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  ddr_cmd_e cmd = DDR_NOP;
  logic [ADDR_W-1:0] addr = '0;
  logic [DQ_W-1:0] dq_in = '0, dq_out;
  logic dqs_in = 0, dqs_in_oe = 0, dq_out_oe, dqs_out, dqs_out_oe, irq;
  nand_out_t nand_o [CH];
  nand_in_t  nand_i [CH];
  logic sram_en = 0;
  logic [3:0] sram_we = '0;
  logic [$clog2(SRAM_WORDS)-1:0] sram_addr = '0;
  logic [31:0] sram_wdata = '0, sram_rdata;
  logic cache_hit, cache_miss;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  ssd_controller #(.PAGE_BYTES(PB), .CACHE_LINES(LINES), .CHANNELS(CH),
                   .SRAM_WORDS(SRAM_WORDS), .PREAMBLE(PRE)) dut (.*);

  for (genvar c = 0; c < CH; c++) begin : g_flash
    nand_flash_model #(.PAGE_BYTES(PB), .CHANNELS(CH), .CH(c), .T_R(40), .T_PROG(150)) u_flash (
      .clk, .nout(nand_o[c]), .nin(nand_i[c]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (cache_hit) hits++;
    if (cache_miss) misses++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic issue(input ddr_cmd_e c, input int unsigned a);
    @(negedge clk);
    cmd = c; addr = ADDR_W'(a);
    @(negedge clk);
    cmd = DDR_NOP; addr = '0;
  endtask

  // read one burst: waits for the SSD's strobe, returns data and the wait
  task automatic rd_burst(input int unsigned pg, input int unsigned col,
                          output logic [BL-1:0][DQ_W-1:0] d, output int wait_cyc);
    logic prev;
    int b;
    issue(DDR_ACT, pg);
    issue(DDR_RD, col);
    wait_cyc = 0;
    while (!dqs_out_oe) begin
      @(negedge clk);
      wait_cyc++;
    end
    prev = 0; b = 0;
    while (b < BL) begin
      if (dqs_out != prev) begin
        d[b] = dq_out;
        b++;
      end
      prev = dqs_out;
      @(negedge clk);
    end
    while (dqs_out_oe) @(negedge clk);
  endtask

  task automatic wr_burst(input int unsigned col, input logic [BL-1:0][DQ_W-1:0] d);
    issue(DDR_WR, col);
    dqs_in_oe = 1; dqs_in = 0;
    @(negedge clk);
    for (int i = 0; i < PRE; i++) @(negedge clk);
    for (int b = 0; b < BL; b++) begin
      dqs_in = (b % 2) == 0; dq_in = d[b];
      @(negedge clk);
    end
    dqs_in = 0; dq_in = '0;
    @(negedge clk);
    dqs_in_oe = 0;
    repeat (6) @(negedge clk);
  endtask

  task automatic check_read(input int unsigned pg, input int unsigned col,
                            input logic [DQ_W-1:0] exp [BL], input logic exp_hit);
    logic [BL-1:0][DQ_W-1:0] d;
    int w, h0, m0;
    h0 = hits; m0 = misses;
    rd_burst(pg, col, d, w);
    for (int b = 0; b < BL; b++) check(d[b] == exp[b], "read data");
    if (exp_hit) check(hits == h0 + 1 && w < 12, "hit: quick strobe");
    else         check(misses == m0 + 1 && w > 40 + PB, "miss: strobe after the flash read");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DQ_W-1:0] exp [BL];
    logic [DQ_W-1:0] page [WPP];
    logic [BL-1:0][DQ_W-1:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    for (int b = 0; b < BL; b++) exp[b] = ssd_tb_pkg::flash_word(7, 8 + b);
    check_read(7, 8, exp, 0);
    for (int b = 0; b < BL; b++) exp[b] = ssd_tb_pkg::flash_word(7, 20 + b);
    check_read(7, 20, exp, 1);

    // whole-page write of page 22
    for (int w = 0; w < WPP; w++) page[w] = {$urandom, $urandom};
    issue(DDR_ACT, 22);
    for (int c = 0; c < WPP; c += BL) begin
      for (int b = 0; b < BL; b++) d[b] = page[c + b];
      wr_burst(c, d);
      if (c != WPP - BL) check(!irq, "no irq before the page is complete");
    end
    while (!irq) @(negedge clk);
    check(g_flash[22 % CH].u_flash.progs == 1, "page programmed on its channel");
    check(g_flash[22 % CH].u_flash.store[longint'(22 / CH) * PB + 9] == page[1][15:8],
          "byte in flash");
    for (int b = 0; b < BL; b++) exp[b] = page[4 + b];
    check_read(22, 4, exp, 1);
    // evict page 22 (same line as 26), then read it from flash
    for (int b = 0; b < BL; b++) exp[b] = ssd_tb_pkg::flash_word(26, b);
    check_read(26, 0, exp, 0);
    check(!irq, "irq cleared by later commands");
    for (int b = 0; b < BL; b++) exp[b] = page[WPP - BL + b];
    check_read(22, WPP - BL, exp, 0);

    // SRAM port
    @(negedge clk);
    sram_en = 1; sram_we = 4'hf; sram_addr = 10'd77; sram_wdata = 32'hcafe_f00d;
    @(negedge clk);
    sram_we = 4'b0010; sram_wdata = 32'h0000_5500;
    @(negedge clk);
    sram_we = 4'h0;
    @(negedge clk);
    sram_en = 0;
    check(sram_rdata == 32'hcafe_550d, "SRAM byte write");

    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
