// tb_ddr_ssd_system: end-to-end test of the DDR-attached SSD and its DMA,
// with every parameter of the design at its default.
//
// Main memory and the four NAND flash devices are behavioural models; the
// CPU is the testbench. The flash timings are shortened (T_R, T_PROG below)
// to keep the run short. The test runs the transfers the design is meant
// for, each a 64 KB DMA as one PRD region (byte count 0):
//   1. read of 64 KB that is not in the cache buffer: every page misses and
//      comes from flash (the SSD's DQS arrives late);
//   2. the same read again: every burst hits the cache buffer;
//   3. write of 64 KB to another SSD area: page by page, each page waits
//      for the SSD's irq (sequential writes);
//   4. read-back of the written area in two PRD regions;
//   5. a read of a page that evicts a written one and a read of the
//      evicted page, which now comes from flash with the written data.
// Every transfer's data are checked word by word. The cycles of each
// transfer are printed, and each mechanism (hit, miss, late DQS, PRD fetch,
// row change, irq wait, eviction, read burst requested while the previous
// one goes to memory) must have happened at least once.
module tb_ddr_ssd_system;
  import ssd_pkg::*;
  localparam int unsigned CH = 4, T_R = 1000, T_PROG = 4000;
  localparam int unsigned WPP = PAGE_BYTES / 8;
  localparam int unsigned XFER = 65536;

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
  int n_hit = 0, n_miss = 0, n_late_dqs = 0, n_prd = 0, n_act = 0, n_irq_wait = 0;
  int n_evict = 0, n_overlap = 0;
  int rd_wait, max_hit_wait = 0;
  dma_op_e op_prev = OP_IDLE;
  logic dqs_oe_prev = 0;

  ddr_ssd_system dut (.*);

  main_memory_model #(.DQ_W(DQ_W)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  for (genvar c = 0; c < CH; c++) begin : g_flash
    nand_flash_model #(.PAGE_BYTES(PAGE_BYTES), .CHANNELS(CH), .CH(c),
                       .T_R(T_R), .T_PROG(T_PROG)) u_flash (
      .clk, .nout(nand_o[c]), .nin(nand_i[c]));
  end

  always #5 clk = ~clk;

  // mechanism counters, observed on the design's own signals
  always @(posedge clk) begin
    if (cache_hit) n_hit++;
    if (cache_miss) n_miss++;
    if (dut.ddr_cmd == DDR_ACT) n_act++;
    // a read burst requested while the previous one goes to memory
    if (dut.ddr_cmd == DDR_RD && dma_op == OP_E_MEM) n_overlap++;
    if (dma_op == OP_B_PRD && op_prev != OP_B_PRD) n_prd++;
    if (cmd_dir == DMA_WRITE && dma_op == OP_C_SSD && op_prev != OP_C_SSD) n_irq_wait++;
    if (dut.ddr_cmd == DDR_RD) rd_wait = 0;
    else if (!dut.dqs_s2h_oe) rd_wait++;
    if (dut.dqs_s2h_oe && !dqs_oe_prev) begin
      if (rd_wait > T_R) n_late_dqs++;
      else if (rd_wait > max_hit_wait) max_hit_wait = rd_wait;
    end
    op_prev     <= dma_op;
    dqs_oe_prev <= dut.dqs_s2h_oe;
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

  task automatic run(input dma_dir_e dir, input int unsigned ssd_a, input int unsigned prd,
                     output int cycles);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_dir = dir; cmd_ssd_addr = ssd_a; cmd_prd_base = prd;
    cycles = 0;
    @(negedge clk);
    cmd_valid = 0;
    while (!dma_done) begin
      @(negedge clk);
      cycles++;
    end
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_miss, cyc_hit, cyc_wr, cyc_rb, cyc;
    int m0, h0;
    int unsigned wr_area;
    wr_area = 100 * PAGE_BYTES;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. 64 KB read, every page from flash
    put_prd(32'h1000, 32'h0010_0000, 0, 1);
    m0 = n_miss;
    run(DMA_READ, 0, 32'h1000, cyc_miss);
    check(n_miss - m0 == XFER / PAGE_BYTES, "one miss per page");
    check_flash_area(32'h0010_0000, 0, XFER, "64 KB read (miss) data");

    // 2. the same read, every burst hits
    put_prd(32'h1100, 32'h0020_0000, 0, 1);
    m0 = n_miss; h0 = n_hit;
    run(DMA_READ, 0, 32'h1100, cyc_hit);
    check(n_miss == m0 && n_hit - h0 == XFER / (BL * 8), "every burst hits");
    check_flash_area(32'h0020_0000, 0, XFER, "64 KB read (hit) data");
    check(cyc_hit * 2 < cyc_miss, "hits are much faster than misses");

    // 3. 64 KB write
    for (int w = 0; w < XFER / 8; w++)
      u_mem.mem[longint'(32'h0030_0000 + 8 * w)] = {$urandom, $urandom};
    put_prd(32'h1200, 32'h0030_0000, 0, 1);
    run(DMA_WRITE, wr_area, 32'h1200, cyc_wr);
    check(n_irq_wait == XFER / PAGE_BYTES, "one irq wait per written page");
    begin
      int progs = 0;
      progs = g_flash[0].u_flash.progs + g_flash[1].u_flash.progs +
              g_flash[2].u_flash.progs + g_flash[3].u_flash.progs;
      check(progs == XFER / PAGE_BYTES, "every page programmed once");
    end

    // 4. read-back in two regions
    put_prd(32'h1300, 32'h0040_0000, 16'h4000, 0);
    put_prd(32'h1308, 32'h0050_0000, 16'hc000, 1);
    m0 = n_miss;
    run(DMA_READ, wr_area, 32'h1300, cyc_rb);
    check(n_miss == m0, "written pages are in the cache buffer");
    check_copy(32'h0040_0000, 32'h0030_0000, 16'h4000, "read-back region 1");
    check_copy(32'h0050_0000, 32'h0030_0000 + 16'h4000, 16'hc000, "read-back region 2");

    // 5. evict written page 100 (line 4) with page 132, then read page 100
    put_prd(32'h1400, 32'h0060_0000, PAGE_BYTES, 1);
    run(DMA_READ, 132 * PAGE_BYTES, 32'h1400, cyc);
    check_flash_area(32'h0060_0000, 132 * PAGE_BYTES, PAGE_BYTES, "evicting read");
    m0 = n_miss;
    put_prd(32'h1500, 32'h0070_0000, PAGE_BYTES, 1);
    run(DMA_READ, wr_area, 32'h1500, cyc);
    if (n_miss == m0 + 1) n_evict++;
    check_copy(32'h0070_0000, 32'h0030_0000, PAGE_BYTES, "evicted page read from flash");

    $display("64 KB read, all miss : %0d cycles", cyc_miss);
    $display("64 KB read, all hit  : %0d cycles (%0d bytes/cycle x100)", cyc_hit,
             100 * XFER / cyc_hit);
    $display("64 KB write          : %0d cycles", cyc_wr);
    $display("64 KB read-back      : %0d cycles", cyc_rb);
    $display("hits=%0d misses=%0d late_dqs=%0d max_hit_wait=%0d prd=%0d act=%0d irq_waits=%0d evictions=%0d overlapped_rd=%0d",
             n_hit, n_miss, n_late_dqs, max_hit_wait, n_prd, n_act, n_irq_wait, n_evict, n_overlap);
    check(n_hit > 0, "cache hit happened");
    check(n_miss > 0, "cache miss happened");
    check(n_late_dqs > 0, "DQS delayed by a flash read happened");
    check(n_prd >= 6, "PRD fetches happened");
    check(n_act > 0, "row activations happened");
    check(n_irq_wait > 0, "irq waits happened");
    check(n_evict > 0, "eviction happened");
    check(n_overlap > 0, "pipelined read bursts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
