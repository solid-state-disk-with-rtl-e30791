// tb_ssd_cache_mem: writes random words to random addresses of the cache
// buffer array and reads them back, checking the one-cycle read latency
// against a reference copy kept in the testbench.
module tb_ssd_cache_mem;
  localparam int unsigned DQ_W = 64, WORDS = 512;

  logic clk = 0, en = 0, we = 0;
  logic [$clog2(WORDS)-1:0] addr = '0;
  logic [DQ_W-1:0] wdata = '0, rdata;
  logic [DQ_W-1:0] ref_mem [WORDS];
  logic            ref_ok  [WORDS];
  int checks = 0, failures = 0;

  ssd_cache_mem #(.DQ_W(DQ_W), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < WORDS; i++) ref_ok[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a     = $urandom_range(WORDS - 1, 0);
      addr  = a[$clog2(WORDS)-1:0];
      en    = 1;
      we    = ($urandom_range(1, 0) == 1) || !ref_ok[a];
      wdata = {$urandom, $urandom};
      if (we) begin
        ref_mem[a] = wdata;
        ref_ok[a]  = 1;
      end
      @(negedge clk);
      en = 0;
      if (!we) begin
        checks++;
        if (rdata !== ref_mem[a]) begin
          failures++;
          $display("FAIL: addr %0d read %h expected %h", a, rdata, ref_mem[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
