// tb_nb_ssd_dma: checks the North Bridge DMA with a main memory model and
// an SSD played by the testbench.
//
// The SSD side answers each RD after a random delay (so no fixed CAS
// latency holds), with the flash pattern of the addressed page, records
// every WR burst, and raises irq some cycles after the last burst of a page
// and drops it at the next command. Checked: memory contents after reads
// spread over several PRD regions, SSD contents after writes, a 64 KB
// region (byte count 0) moved in exactly 2048 bursts, one irq wait per
// written page, and the order of the sub-operations the DMA reports:
// A C D B E for reads, A B E D C for writes.
module tb_nb_ssd_dma;
  import ssd_pkg::*;
  localparam int unsigned PB = 256, WPP = PB / 8, PRE = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic cmd_valid = 0, cmd_ready, done;
  dma_dir_e cmd_dir = DMA_READ;
  logic [31:0] cmd_ssd_addr = '0, cmd_prd_base = '0;
  dma_op_e op;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  logic [DQ_W-1:0] mem_wdata, mem_rdata;
  ddr_cmd_e ddr_cmd;
  logic [ADDR_W-1:0] ddr_addr;
  logic [DQ_W-1:0] dq_out, dq_in = '0;
  logic dq_out_oe, dqs_out, dqs_out_oe, dqs_in = 0, dqs_in_oe = 0, ssd_irq = 0;

  int checks = 0, failures = 0;
  int rd_cmds = 0, wr_cmds = 0, acts = 0, irq_pages = 0, overlapped = 0;
  logic [DQ_W-1:0] ssd_mem [longint];
  dma_op_e op_trace [$];

  nb_ssd_dma #(.PAGE_BYTES(PB), .PREAMBLE(PRE)) dut (.*);
  main_memory_model #(.DQ_W(DQ_W)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  // record each change of the reported sub-operation
  always @(posedge clk)
    if (op != OP_IDLE && (op_trace.size() == 0 || op_trace[$] != op)) op_trace.push_back(op);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // SSD side
  initial begin
    int unsigned row, col;
    logic [BL-1:0][DQ_W-1:0] d;
    row = 0;
    forever begin
      @(posedge clk);
      if (ddr_cmd != DDR_NOP) ssd_irq <= 0;
      if (ddr_cmd == DDR_ACT) begin
        row = ddr_addr; acts++;
      end else if (ddr_cmd == DDR_RD) begin
        col = ddr_addr; rd_cmds++;
        if (op == OP_E_MEM) overlapped++;   // previous burst still going to memory
        @(negedge clk);
        repeat ($urandom_range(1, 0) ? $urandom_range(5, 0) : $urandom_range(200, 50)) @(negedge clk);
        dqs_in_oe = 1; dqs_in = 0;
        repeat (PRE) @(negedge clk);
        for (int b = 0; b < BL; b++) begin
          dqs_in = (b % 2) == 0; dq_in = ssd_tb_pkg::flash_word(row, col + b);
          @(negedge clk);
        end
        dqs_in = 0; dq_in = '0;
        @(negedge clk);
        dqs_in_oe = 0;
      end else if (ddr_cmd == DDR_WR) begin
        col = ddr_addr; wr_cmds++;
        for (int b = 0; b < BL; b++) begin
          do @(posedge clk); while (!(dqs_out_oe && dq_out_oe));
          check(dqs_out == ((b % 2) == 0), "write strobe");
          ssd_mem[longint'(row) * WPP + col + b] = dq_out;
        end
        if (col == WPP - BL) begin
          repeat ($urandom_range(60, 10)) @(posedge clk);
          ssd_irq <= 1;
          irq_pages++;
        end
      end
    end
  end

  task automatic put_prd(input int unsigned at, input int unsigned base,
                         input int unsigned count, input logic eot);
    prd_t p;
    p = '0; p.base = base; p.count = 16'(count); p.eot = eot;
    u_mem.mem[longint'(at)] = p;
  endtask

  task automatic run(input dma_dir_e dir, input int unsigned ssd_a, input int unsigned prd);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    op_trace.delete();
    cmd_valid = 1; cmd_dir = dir; cmd_ssd_addr = ssd_a; cmd_prd_base = prd;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic logic trace_starts(input dma_op_e a, b, c, d, e);
    return op_trace.size() >= 5 && op_trace[0] == a && op_trace[1] == b &&
           op_trace[2] == c && op_trace[3] == d && op_trace[4] == e;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sa, r0, b0;
    int nb;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // read: 3 regions, 3 + 2 + 4 bursts, starting mid-page
    put_prd(32'h1000, 32'h10000, 96, 0);
    put_prd(32'h1008, 32'h20000, 64, 0);
    put_prd(32'h1010, 32'h30000, 128, 1);
    sa = 3 * PB + 5 * 32;
    r0 = rd_cmds;
    run(DMA_READ, sa, 32'h1000);
    check(rd_cmds - r0 == 9, "read bursts = sum of byte counts / 32");
    check(trace_starts(OP_A_CMD, OP_C_SSD, OP_D_IF, OP_B_PRD, OP_E_MEM), "read order A C D B E");
    nb = 0;
    foreach (op_trace[i]) if (op_trace[i] == OP_B_PRD) nb++;
    check(nb == 3, "one PRD fetch per region");
    for (int w = 0; w < 36; w++) begin
      int unsigned base, off, a;
      a    = sa + 8 * w;
      base = (w < 12) ? 32'h10000 : (w < 20) ? 32'h20000 : 32'h30000;
      off  = (w < 12) ? w : (w < 20) ? w - 12 : w - 20;
      check(u_mem.mem[longint'(base + 8 * off)] ==
            ssd_tb_pkg::flash_word(a / PB, (a % PB) / 8), "read data in memory");
    end

    // write: 2 regions, 1 + 2 pages, starting at page 10
    for (int w = 0; w < 3 * WPP; w++)
      u_mem.mem[longint'(32'h40000 + 8 * w)] = {$urandom, $urandom};
    put_prd(32'h2000, 32'h40000, PB, 0);
    put_prd(32'h2008, 32'h40000 + PB, 2 * PB, 1);
    b0 = irq_pages;
    run(DMA_WRITE, 10 * PB, 32'h2000);
    check(irq_pages - b0 == 3, "one irq wait per page");
    check(trace_starts(OP_A_CMD, OP_B_PRD, OP_E_MEM, OP_D_IF, OP_E_MEM), "write order A B E D");
    nb = 0;
    foreach (op_trace[i]) if (op_trace[i] == OP_C_SSD) nb++;
    check(nb == 3, "write waits for the SSD once per page");
    for (int w = 0; w < 3 * WPP; w++)
      check(ssd_mem[longint'(10 * WPP + w)] == u_mem.mem[longint'(32'h40000 + 8 * w)],
            "write data in the SSD");

    // 64 KB region: byte count 0
    put_prd(32'h3000, 32'h100000, 0, 1);
    r0 = rd_cmds;
    run(DMA_READ, 0, 32'h3000);
    check(rd_cmds - r0 == 2048, "64 KB read is 2048 bursts");
    check(u_mem.mem[longint'(32'h100000 + 65536 - 8)] ==
          ssd_tb_pkg::flash_word(65535 / PB, WPP - 1), "last word of 64 KB");

    check(overlapped > 0, "read bursts pipelined with memory writes");
    // short regions: 2 + 1 + 1 bursts; the read-ahead must not run past a
    // region whose entry has not been read yet
    put_prd(32'h3100, 32'h200000, 64, 0);
    put_prd(32'h3108, 32'h210000, 32, 0);
    put_prd(32'h3110, 32'h220000, 32, 1);
    r0 = rd_cmds;
    run(DMA_READ, 7 * PB, 32'h3100);
    repeat (400) @(negedge clk);
    check(rd_cmds - r0 == 4, "no read burst beyond the end of the table");
    check(u_mem.mem[longint'(32'h220000)] == ssd_tb_pkg::flash_word(7, 12), "last short region");

    $display("bursts rd=%0d wr=%0d act=%0d overlapped=%0d", rd_cmds, wr_cmds, acts, overlapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
