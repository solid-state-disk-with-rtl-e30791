// tb_ssd_ddr_if: checks the SSD's DDR slave port with the host and the
// cache buffer both played by the testbench.
//
// Reads: ACT + RD, the cache side answers after a random delay from 0 to
// 300 cycles (a hit or a flash read). The SSD must leave DQS undriven until
// the data are there, then drive the preamble and the burst, the first beat
// exactly PREAMBLE + 1 cycles after the cache's rd_valid. Writes: the host
// drives DQS and the burst; the cache must get the right row, column and
// data. irq: rises after prog_done and falls at the next command.
module tb_ssd_ddr_if;
  import ssd_pkg::*;
  localparam int unsigned PRE = 2;
  localparam int unsigned COL_W = $clog2(PAGE_BYTES / 8);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  ddr_cmd_e cmd = DDR_NOP;
  logic [ADDR_W-1:0] addr = '0;
  logic [DQ_W-1:0] dq_in = '0, dq_out;
  logic dqs_in = 0, dqs_in_oe = 0, dq_out_oe, dqs_out, dqs_out_oe, irq;
  logic req_valid, req_we, req_ready = 1, rd_valid = 0, prog_done = 0;
  logic [ROW_W-1:0] req_row;
  logic [COL_W-1:0] req_col;
  logic [BL-1:0][DQ_W-1:0] req_wdata, rd_data = '0;
  int checks = 0, failures = 0;

  ssd_ddr_if #(.PREAMBLE(PRE)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BL-1:0][DQ_W-1:0] d;
    int unsigned row, col, delay;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      row = $urandom_range(65535, 0);
      col = $urandom_range(COL_W'((1 << COL_W) - 1) / BL, 0) * BL;
      for (int b = 0; b < BL; b++) d[b] = {$urandom, $urandom};
      issue(DDR_ACT, row);
      if (n % 2 == 0) begin
        // read burst
        delay = (n % 4 == 0) ? $urandom_range(8, 0) : $urandom_range(300, 100);
        @(negedge clk);
        cmd = DDR_RD; addr = ADDR_W'(col);
        @(negedge clk);
        cmd = DDR_NOP;
        check(req_valid && !req_we && req_row == ROW_W'(row) && req_col == COL_W'(col),
              "read request to the cache");
        @(negedge clk);
        check(!req_valid, "request taken");
        repeat (delay) begin
          check(!dqs_out_oe, "no strobe before the data");
          @(negedge clk);
        end
        rd_valid = 1; rd_data = d;
        @(negedge clk);
        rd_valid = 0; rd_data = '0;
        for (int c = 0; c < PRE; c++) begin
          check(dqs_out_oe && !dqs_out && !dq_out_oe, "read preamble");
          @(negedge clk);
        end
        for (int b = 0; b < BL; b++) begin
          check(dqs_out_oe && dq_out_oe && dqs_out == ((b % 2) == 0) && dq_out == d[b],
                "read beat");
          @(negedge clk);
        end
        @(negedge clk);
        check(!dqs_out_oe, "strobe released");
      end else begin
        // write burst: WR, then preamble and beats driven by the host
        @(negedge clk);
        cmd = DDR_WR; addr = ADDR_W'(col);
        @(negedge clk);
        cmd = DDR_NOP;
        dqs_in_oe = 1; dqs_in = 0;
        repeat (PRE) @(negedge clk);
        for (int b = 0; b < BL; b++) begin
          dqs_in = (b % 2) == 0; dq_in = d[b];
          @(negedge clk);
        end
        dqs_in = 0; dq_in = '0;
        @(negedge clk);
        dqs_in_oe = 0;
        check(req_valid && req_we && req_row == ROW_W'(row) && req_col == COL_W'(col)
              && req_wdata == d, "write request to the cache");
        // page programmed: irq up until the next command
        repeat ($urandom_range(20, 1)) @(negedge clk);
        check(!irq, "no irq before the program ends");
        prog_done = 1;
        @(negedge clk);
        prog_done = 0;
        repeat (3) begin
          check(irq, "irq after program");
          @(negedge clk);
        end
      end
    end
    issue(DDR_ACT, 0);
    check(!irq, "irq cleared by the next command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
