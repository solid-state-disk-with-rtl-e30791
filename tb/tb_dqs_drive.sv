// tb_dqs_drive: checks one DDR burst transmitter.
//
// Sends bursts of random data with random gaps and checks, cycle by cycle,
// against a model written from the protocol: DQS driven low for PREAMBLE
// cycles, then BL beats with DQS alternating 1,0,1,0 and beat i on DQ,
// then one postamble cycle, then drivers off and `done`.
module tb_dqs_drive;
  localparam int unsigned DQ_W = 64, BL = 4, PRE = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  logic start = 0;
  logic [BL-1:0][DQ_W-1:0] data = '0;
  logic busy, done, dqs, dqs_oe, dq_oe;
  logic [DQ_W-1:0] dq;
  int checks = 0, failures = 0;

  dqs_drive #(.DQ_W(DQ_W), .BL(BL), .PREAMBLE(PRE)) dut (.*);

  always #5 clk = ~clk;

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!dqs_oe && !dq_oe && !busy, "idle after reset");
    for (int n = 0; n < 50; n++) begin
      for (int b = 0; b < BL; b++) d[b] = {$urandom, $urandom};
      @(negedge clk);
      data  = d;
      start = 1;
      @(negedge clk);
      start = 0;
      data  = '0;   // the block must have kept its own copy
      for (int c = 0; c < PRE; c++) begin
        check(dqs_oe && !dqs && !dq_oe && busy, "preamble");
        @(negedge clk);
      end
      for (int b = 0; b < BL; b++) begin
        check(dqs_oe && dq_oe && (dqs == ((b % 2) == 0)), "beat strobe");
        check(dq == d[b], "beat data");
        @(negedge clk);
      end
      check(dqs_oe && !dqs && !dq_oe, "postamble");
      @(negedge clk);
      check(!dqs_oe && !busy && done, "end of burst");
      repeat ($urandom_range(3, 0)) begin
        @(negedge clk);
        check(!dqs_oe && !done, "quiet between bursts");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
