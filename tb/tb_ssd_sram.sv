// tb_ssd_sram: random byte-enabled writes and reads of the controller SRAM,
// checked against a byte-wise reference copy.
module tb_ssd_sram;
  localparam int unsigned WORDS = 256;

  logic clk = 0, en = 0;
  logic [3:0] we = '0;
  logic [$clog2(WORDS)-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  ssd_sram #(.WORDS(WORDS), .W(32)) dut (.*);

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
    // fill every word first so that reads are defined
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      en = 1; we = 4'hf; addr = i[$clog2(WORDS)-1:0]; wdata = $urandom;
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a    = $urandom_range(WORDS - 1, 0);
      addr = a[$clog2(WORDS)-1:0];
      en   = 1;
      we   = ($urandom_range(1, 0) == 1) ? 4'($urandom_range(15, 1)) : 4'h0;
      wdata = $urandom;
      for (int b = 0; b < 4; b++) if (we[b]) ref_mem[a][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
      en = 0;
      if (we == 0) begin
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
