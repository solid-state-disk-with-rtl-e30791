// tb_ssd_cache: checks the cache buffer controller with the NAND flash
// side played by the testbench.
//
// The flash side answers a page read after FLASH_DELAY cycles with the
// page's words (the flash pattern, or what was programmed), and takes a
// page program by fetching every word over the pd_* port. Checked: read
// data on hits and misses, the hit/miss pulses, that a hit is served much
// faster than a miss, eviction in a direct-mapped buffer, whole-page writes
// that end in exactly one program of the right data and a prog_done pulse,
// and reads that hit the freshly written page.
module tb_ssd_cache;
  localparam int unsigned LINES = 4, PB = 256, DQ_W = 64, BL = 4, ROW_W = 16;
  localparam int unsigned WPP = PB / 8, COL_W = $clog2(WPP);
  localparam int unsigned FLASH_DELAY = 60;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic req_valid = 0, req_we = 0, req_ready, rd_valid, prog_done, hit, miss;
  logic [ROW_W-1:0] req_row = '0;
  logic [COL_W-1:0] req_col = '0;
  logic [BL-1:0][DQ_W-1:0] req_wdata = '0, rd_data;
  logic nf_req_valid, nf_req_prog, nf_req_ready = 1, nf_done = 0;
  logic [ROW_W-1:0] nf_req_page;
  logic nf_fill_valid = 0, nf_pd_req = 0;
  logic [COL_W-1:0] nf_fill_idx = '0, nf_pd_idx = '0;
  logic [DQ_W-1:0] nf_fill_data = '0, nf_pd_data;

  logic [DQ_W-1:0] flash [longint];   // programmed words, by page * WPP + word
  int checks = 0, failures = 0, hits = 0, misses = 0, progs = 0, prog_dones = 0;

  ssd_cache #(.LINES(LINES), .PAGE_BYTES(PB), .DQ_W(DQ_W), .BL(BL), .ROW_W(ROW_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (hit) hits++;
    if (miss) misses++;
    if (prog_done) prog_dones++;
  end

  function automatic logic [DQ_W-1:0] flash_word(input int unsigned pg, input int unsigned w);
    longint key = longint'(pg) * WPP + w;
    if (flash.exists(key)) return flash[key];
    return ssd_tb_pkg::flash_word(pg, w);
  endfunction

  // flash side
  initial begin
    int unsigned pg;
    forever begin
      @(posedge clk);
      if (nf_req_valid && nf_req_ready) begin
        pg = nf_req_page;
        @(negedge clk);
        nf_req_ready = 0;
        if (!nf_req_prog) begin
          repeat (FLASH_DELAY) @(negedge clk);
          for (int w = 0; w < WPP; w++) begin
            nf_fill_valid = 1; nf_fill_idx = COL_W'(w); nf_fill_data = flash_word(pg, w);
            @(negedge clk);
          end
          nf_fill_valid = 0;
        end else begin
          for (int w = 0; w < WPP; w++) begin
            nf_pd_req = 1; nf_pd_idx = COL_W'(w);
            @(negedge clk);
            nf_pd_req = 0;
            @(negedge clk);
            flash[longint'(pg) * WPP + w] = nf_pd_data;
          end
          progs++;
          repeat (20) @(negedge clk);
        end
        nf_done = 1;
        @(negedge clk);
        nf_done = 0;
        nf_req_ready = 1;
      end
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // one read burst; returns the latency from request to rd_valid
  task automatic rd(input int unsigned pg, input int unsigned col, output int lat,
                    output logic [BL-1:0][DQ_W-1:0] d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 0; req_row = ROW_W'(pg); req_col = COL_W'(col);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rd_valid) begin
      @(negedge clk);
      lat++;
    end
    d = rd_data;
  endtask

  task automatic check_rd(input int unsigned pg, input int unsigned col, input logic exp_hit);
    int lat, h0, m0;
    logic [BL-1:0][DQ_W-1:0] d;
    h0 = hits; m0 = misses;
    rd(pg, col, lat, d);
    for (int b = 0; b < BL; b++) check(d[b] == flash_word(pg, col + b), "read data");
    check(exp_hit ? (hits == h0 + 1 && misses == m0) : (misses == m0 + 1 && hits == h0),
          "hit/miss outcome");
    if (exp_hit) check(lat <= BL + 3, "hit latency");
    else         check(lat > FLASH_DELAY + WPP, "miss waits for the flash");
  endtask

  task automatic wr(input int unsigned pg, input int unsigned col,
                    input logic [BL-1:0][DQ_W-1:0] d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 1; req_row = ROW_W'(pg); req_col = COL_W'(col); req_wdata = d;
    @(negedge clk);
    req_valid = 0;
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
    logic [DQ_W-1:0] newpage [WPP];
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_rd(5, 0, 0);            // cold miss
    check_rd(5, 8, 1);            // same page: hit
    check_rd(5, WPP - BL, 1);
    check_rd(6, 4, 0);            // other line: miss
    check_rd(9, 0, 0);            // same line as page 5: evicts it
    check_rd(5, 0, 0);            // miss again
    check_rd(6, 0, 1);            // line of page 6 untouched
    // whole-page write of page 13 (line 1, evicts page 5)
    for (int w = 0; w < WPP; w++) newpage[w] = {$urandom, $urandom};
    for (int c = 0; c < WPP; c += BL) begin
      for (int b = 0; b < BL; b++) d[b] = newpage[c + b];
      wr(13, c, d);
      if (c != WPP - BL) check(prog_dones == 0, "no program before the page is complete");
    end
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    check(progs == 1 && prog_dones == 1, "one program per page");
    for (int w = 0; w < WPP; w++) check(flash[13 * WPP + w] == newpage[w], "programmed data");
    check_rd(13, 12, 1);          // written page is in the buffer
    check_rd(5, 4, 0);
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
