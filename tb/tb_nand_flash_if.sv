// tb_nand_flash_if: checks the NAND flash interface against four flash
// models, one per channel.
//
// Reads pages that were never written and checks every word against the
// flash pattern; programs pages with random data supplied over the pd_*
// port (answering one cycle after pd_req, as the cache buffer does),
// checks that the page landed in the right channel's flash, and reads it
// back through the interface.
module tb_nand_flash_if;
  import ssd_pkg::nand_out_t, ssd_pkg::nand_in_t;
  localparam int unsigned CH = 4, PB = 256, DQ_W = 64, ROW_W = 16;
  localparam int unsigned WPP = PB / 8, WI_W = $clog2(WPP);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic req_valid = 0, req_prog = 0, req_ready, done;
  logic [ROW_W-1:0] req_page = '0;
  logic fill_valid, pd_req;
  logic [WI_W-1:0] fill_idx, pd_idx;
  logic [DQ_W-1:0] fill_data, pd_data = '0;
  nand_out_t nand_o [CH];
  nand_in_t  nand_i [CH];
  logic [DQ_W-1:0] page_buf [WPP];
  logic [DQ_W-1:0] got [WPP];
  int nfill;
  int checks = 0, failures = 0;

  nand_flash_if #(.CHANNELS(CH), .PAGE_BYTES(PB), .DQ_W(DQ_W), .ROW_W(ROW_W)) dut (.*);

  for (genvar c = 0; c < CH; c++) begin : g_flash
    nand_flash_model #(.PAGE_BYTES(PB), .CHANNELS(CH), .CH(c), .T_R(20), .T_PROG(60)) u_flash (
      .clk, .nout(nand_o[c]), .nin(nand_i[c]));
  end

  always #5 clk = ~clk;

  // program data source, one cycle after pd_req
  always @(posedge clk) if (pd_req) pd_data <= page_buf[pd_idx];
  // fill sink
  always @(posedge clk) if (fill_valid) begin
    got[fill_idx] = fill_data;
    nfill++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic page_op(input logic prog, input int unsigned page);
    @(negedge clk);
    check(req_ready, "ready before request");
    req_valid = 1; req_prog = prog; req_page = ROW_W'(page); nfill = 0;
    @(negedge clk);
    req_valid = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned pg;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reads of unwritten pages on every channel
    for (int n = 0; n < 8; n++) begin
      pg = $urandom_range(4000, 0);
      page_op(0, pg);
      check(nfill == WPP, "whole page filled");
      for (int w = 0; w < WPP; w++)
        check(got[w] == ssd_tb_pkg::flash_word(pg, w), "read data");
    end
    // program then read back
    for (int n = 0; n < 6; n++) begin
      pg = 100 + n;
      for (int w = 0; w < WPP; w++) page_buf[w] = {$urandom, $urandom};
      page_op(1, pg);
      check(nfill == 0, "no fill during program");
      page_op(0, pg);
      for (int w = 0; w < WPP; w++) check(got[w] == page_buf[w], "program read back");
    end
    check(g_flash[0].u_flash.progs + g_flash[1].u_flash.progs +
          g_flash[2].u_flash.progs + g_flash[3].u_flash.progs == 6, "program count");
    check(g_flash[100 % CH].u_flash.progs == 2 && g_flash[103 % CH].u_flash.progs == 1,
          "pages striped over channels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
