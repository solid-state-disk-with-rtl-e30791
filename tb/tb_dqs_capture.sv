// tb_dqs_capture: checks the DDR burst receiver.
//
// Drives bursts as a DDR sender does (DQS low for a random preamble, then
// one beat per DQS edge), each after a random number of idle cycles in
// which DQS toggles while not driven (noise the receiver must ignore), and
// checks the received words and the single `valid` pulse one cycle after
// the last beat.
module tb_dqs_capture;
  localparam int unsigned DQ_W = 64, BL = 4;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic dqs = 0, dqs_oe = 0;
  logic [DQ_W-1:0] dq = '0;
  logic [BL-1:0][DQ_W-1:0] data;
  logic valid;
  int checks = 0, failures = 0, valids = 0;

  dqs_capture #(.DQ_W(DQ_W), .BL(BL)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid) valids++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BL-1:0][DQ_W-1:0] d;
    int n_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      for (int b = 0; b < BL; b++) d[b] = {$urandom, $urandom};
      repeat ($urandom_range(6, 0)) begin
        @(negedge clk);
        dqs_oe = 0;
        dqs    = $urandom_range(1, 0);
        dq     = {$urandom, $urandom};
      end
      n_before = valids;
      @(negedge clk);
      dqs_oe = 1;
      dqs    = 0;
      repeat ($urandom_range(3, 1) - 1) @(negedge clk);
      for (int b = 0; b < BL; b++) begin
        @(negedge clk);
        dqs = (b % 2) == 0;
        dq  = d[b];
      end
      @(negedge clk);
      dqs = 0;
      dq  = '0;
      check(valid, "valid one cycle after the last beat");
      check(data == d, "burst data");
      @(negedge clk);
      dqs_oe = 0;
      check(!valid, "valid is a single pulse");
      check(valids == n_before + 1, "exactly one burst received");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
