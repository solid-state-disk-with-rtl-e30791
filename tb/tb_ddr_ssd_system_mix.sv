// tb_ddr_ssd_system_mix: a random mix of DMA reads and writes on the
// DDR-attached SSD, all design parameters at their defaults.
//
// The transaction mix follows the desktop workload the design targets:
// 52% of the transactions are writes and 48% reads, each 1 to 4 SSD pages
// at a random page of a 256-page area (four times the cache buffer, so most
// reads miss). Reads use one or two PRD regions with a random split. The
// testbench keeps a reference copy of the SSD's contents (unwritten flash
// holds ssd_tb_pkg::flash_word) and checks every word read back, so it
// covers reads of pages just written (cache hits), of written pages that
// were since evicted (read back from flash) and of untouched flash. It
// prints the share of read transactions that met at least one miss.
module tb_ddr_ssd_system_mix;
  import ssd_pkg::*;
  localparam int unsigned CH = 4, T_R = 1000, T_PROG = 4000;
  localparam int unsigned WPP = PAGE_BYTES / 8;
  localparam int unsigned AREA_PAGES = 256, N_TRANS = 120;

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
  int n_hit = 0, n_miss = 0;
  logic [63:0] ref_w [int];   // SSD words written so far, by page * WPP + word

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

  always @(posedge clk) begin
    if (cache_hit) n_hit++;
    if (cache_miss) n_miss++;
  end

  function automatic logic [63:0] expect_word(input int unsigned page, input int unsigned w);
    int key = int'(page * WPP + w);
    if (ref_w.exists(key)) return ref_w[key];
    return ssd_tb_pkg::flash_word(page, w);
  endfunction

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

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_wr = 0, n_rd = 0, n_rd_miss = 0, n_pages = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int t = 0; t < N_TRANS; t++) begin
      int unsigned page, np, bytes, buf_a, split, m0;
      logic is_write;
      np      = $urandom_range(4, 1);
      page    = $urandom_range(AREA_PAGES - np, 0);
      bytes   = np * PAGE_BYTES;
      buf_a   = 32'h0100_0000 + t * 32'h1_0000;
      is_write = ($urandom_range(99, 0) < 52);
      n_pages += np;
      if (is_write) begin
        n_wr++;
        for (int w = 0; w < bytes / 8; w++)
          u_mem.mem[longint'(buf_a + 8 * w)] = {$urandom, $urandom};
        put_prd(32'h2000, buf_a, bytes, 1);
        run(DMA_WRITE, page * PAGE_BYTES, 32'h2000);
        for (int w = 0; w < bytes / 8; w++)
          ref_w[int'(page * WPP + w)] = u_mem.mem[longint'(buf_a + 8 * w)];
      end else begin
        int bad = 0;
        n_rd++;
        // one region, or two split at a random burst boundary
        split = (np > 1 || $urandom_range(1, 0)) ? 32 * $urandom_range(bytes / 32 - 1, 1) : bytes;
        if (split == bytes) begin
          put_prd(32'h2000, buf_a, bytes, 1);
        end else begin
          put_prd(32'h2000, buf_a, split, 0);
          put_prd(32'h2008, buf_a + 32'h8000, bytes - split, 1);
        end
        m0 = n_miss;
        run(DMA_READ, page * PAGE_BYTES, 32'h2000);
        if (n_miss != m0) n_rd_miss++;
        for (int w = 0; w < bytes / 8; w++) begin
          int unsigned a;
          a = (8 * w < split) ? buf_a + 8 * w : buf_a + 32'h8000 + 8 * w - split;
          if (u_mem.mem[longint'(a)] !== expect_word(page + w / WPP, w % WPP)) bad++;
        end
        check(bad == 0, $sformatf("read of %0d pages at page %0d", np, page));
      end
    end

    $display("transactions: %0d writes, %0d reads, %0d pages; reads with a miss: %0d%%",
             n_wr, n_rd, n_pages, n_rd == 0 ? 0 : 100 * n_rd_miss / n_rd);
    $display("bursts: hits=%0d misses=%0d", n_hit, n_miss);
    check(n_wr > 0 && n_rd > 0, "both directions ran");
    check(n_rd_miss > 0, "read misses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
