// tb_ddr_ssd_system_bl8: end-to-end test of the DDR-attached SSD and its DMA
// with burst length 8 instead of the default 4.
//
// Every DDR burst carries 8 beats (64 bytes), so the DMA divides each PRD
// byte count by 64 instead of 32. Main memory and the four NAND flash
// devices are behavioural models with shortened timings. The test runs an
// 8 KB read that misses the cache buffer, the same read again (every burst
// hits), an 8 KB write (one irq wait per page) and a read-back of the
// written area in two PRD regions, and checks every word and the number of
// DDR read and write bursts against byte count / 64.
module tb_ddr_ssd_system_bl8;
  import ssd_pkg::*;
  localparam int unsigned BL8 = 8, CH = 4, T_R = 600, T_PROG = 2000;
  localparam int unsigned XFER = 8192;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic cmd_valid = 0, cmd_ready, dma_done;
  dma_dir_e cmd_dir = DMA_READ;
  logic [31:0] cmd_ssd_addr = '0, cmd_prd_base = '0;
  dma_op_e dma_op;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  logic [DQ_W-1:0] mem_wdata, mem_rdata;
  nand_out_t nand_o [CH];
  nand_in_t  nand_i [CH];
  logic sram_en = 0;
  logic [3:0] sram_we = '0;
  logic [13:0] sram_addr = '0;
  logic [31:0] sram_wdata = '0, sram_rdata;
  logic ssd_irq, cache_hit, cache_miss;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_rd = 0, n_wr = 0;

  ddr_ssd_system #(.BL(BL8)) dut (.*);

  main_memory_model #(.DQ_W(DQ_W)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  for (genvar c = 0; c < CH; c++) begin : g_flash
    nand_flash_model #(.PAGE_BYTES(PAGE_BYTES), .CHANNELS(CH), .CH(c),
                       .T_R(T_R), .T_PROG(T_PROG)) u_flash (
      .clk, .nout(nand_o[c]), .nin(nand_i[c]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (cache_hit) n_hit++;
    if (cache_miss) n_miss++;
    if (dut.ddr_cmd == DDR_RD) n_rd++;
    if (dut.ddr_cmd == DDR_WR) n_wr++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic put_prd(input int unsigned at, input int unsigned base,
                         input int unsigned count, input logic eot);
    prd_t p;
    p = '0; p.base = base; p.count = 16'(count); p.eot = eot;
    u_mem.mem[longint'(at)] = p;
  endtask

  task automatic run(input dma_dir_e dir, input int unsigned ssd_a, input int unsigned prd);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_dir = dir; cmd_ssd_addr = ssd_a; cmd_prd_base = prd;
    @(negedge clk);
    cmd_valid = 0;
    while (!dma_done) @(negedge clk);
  endtask

  task automatic check_flash_area(input int unsigned mem_base, input int unsigned ssd_a,
                                  input int unsigned bytes, input string what);
    int bad = 0;
    for (int w = 0; w < bytes / 8; w++) begin
      int unsigned a = ssd_a + 8 * w;
      if (u_mem.mem[longint'(mem_base + 8 * w)] !==
          ssd_tb_pkg::flash_word(a / PAGE_BYTES, (a % PAGE_BYTES) / 8)) bad++;
    end
    check(bad == 0, what);
  endtask

  task automatic check_copy(input int unsigned dst, input int unsigned src,
                            input int unsigned bytes, input string what);
    int bad = 0;
    for (int w = 0; w < bytes / 8; w++)
      if (u_mem.mem[longint'(dst + 8 * w)] !== u_mem.mem[longint'(src + 8 * w)]) bad++;
    check(bad == 0, what);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, w0, h0, m0;
    int unsigned wr_area;
    wr_area = 40 * PAGE_BYTES;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // read, every page from flash
    put_prd(32'h1000, 32'h0010_0000, XFER, 1);
    r0 = n_rd; m0 = n_miss;
    run(DMA_READ, 0, 32'h1000);
    check(n_rd - r0 == XFER / (BL8 * 8), "read bursts = byte count / 64");
    check(n_miss - m0 == XFER / PAGE_BYTES, "one miss per page");
    check_flash_area(32'h0010_0000, 0, XFER, "read (miss) data");

    // the same read, every burst hits
    put_prd(32'h1100, 32'h0020_0000, XFER, 1);
    h0 = n_hit; m0 = n_miss;
    run(DMA_READ, 0, 32'h1100);
    check(n_miss == m0 && n_hit - h0 == XFER / (BL8 * 8), "every burst hits");
    check_flash_area(32'h0020_0000, 0, XFER, "read (hit) data");

    // write, then read back in two regions
    for (int w = 0; w < XFER / 8; w++)
      u_mem.mem[longint'(32'h0030_0000 + 8 * w)] = {$urandom, $urandom};
    put_prd(32'h1200, 32'h0030_0000, XFER, 1);
    w0 = n_wr;
    run(DMA_WRITE, wr_area, 32'h1200);
    check(n_wr - w0 == XFER / (BL8 * 8), "write bursts = byte count / 64");
    check(g_flash[0].u_flash.progs + g_flash[1].u_flash.progs +
          g_flash[2].u_flash.progs + g_flash[3].u_flash.progs == XFER / PAGE_BYTES,
          "every written page programmed once");

    put_prd(32'h1300, 32'h0040_0000, 16'h0c00, 0);
    put_prd(32'h1308, 32'h0050_0000, XFER - 16'h0c00, 1);
    run(DMA_READ, wr_area, 32'h1300);
    check_copy(32'h0040_0000, 32'h0030_0000, 16'h0c00, "read-back region 1");
    check_copy(32'h0050_0000, 32'h0030_0000 + 16'h0c00, XFER - 16'h0c00, "read-back region 2");

    $display("bursts rd=%0d wr=%0d hits=%0d misses=%0d", n_rd, n_wr, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
