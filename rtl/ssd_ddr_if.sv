// ssd_ddr_if: the SSD's host interface, a DDR DRAM slave port whose read
// latency is not fixed.
//
// The host addresses the SSD like a DRAM: ACT opens a row (the SSD page
// number), RD or WR with a column address (the first 64-bit beat of the
// burst in that page) moves one burst of BL beats. A DRAM returns read data
// a fixed CAS latency after RD. The SSD cannot: a cache buffer hit answers
// quickly, a miss must first read the page from NAND flash. So the read
// data strobe carries the timing: after RD the SSD keeps DQS undriven for
// as long as the data takes, and only when the burst is in hand does it
// drive the DQS preamble and the toggling DQS with the data (dqs_drive).
// The host waits for that strobe instead of counting cycles. Writes use the
// ordinary DDR form: the host drives DQS with the data and this block
// captures the burst on the strobe edges (dqs_capture), then hands it to
// the cache buffer.
//
// `irq` rises when the cache buffer reports that a page has been programmed
// into flash and falls at the host's next ACT, RD or WR; the host uses it to
// run writes one after another. The DQS signalling is the document's; the
// single outstanding burst, the irq handshake and the command encoding
// ({RAS#, CAS#, WE#}) are this design's choices.
//
// Timing: a WR burst goes to the cache one cycle after its last beat;
// read data appear PREAMBLE + 1 cycles after rd_valid from the cache.
module ssd_ddr_if
  import ssd_pkg::ddr_cmd_e;
#(
  parameter int unsigned DQ_W       = ssd_pkg::DQ_W,
  parameter int unsigned BL         = ssd_pkg::BL,
  parameter int unsigned ROW_W      = ssd_pkg::ROW_W,
  parameter int unsigned ADDR_W     = ssd_pkg::ADDR_W,
  parameter int unsigned PAGE_BYTES = ssd_pkg::PAGE_BYTES,
  parameter int unsigned PREAMBLE   = 2,
  localparam int unsigned COL_W     = $clog2(PAGE_BYTES / (DQ_W / 8))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // DDR bus, host to SSD
  input  ddr_cmd_e                cmd,
  input  logic [ADDR_W-1:0]       addr,
  input  logic [DQ_W-1:0]         dq_in,
  input  logic                    dqs_in,
  input  logic                    dqs_in_oe,
  // DDR bus, SSD to host
  output logic [DQ_W-1:0]         dq_out,
  output logic                    dq_out_oe,
  output logic                    dqs_out,
  output logic                    dqs_out_oe,
  output logic                    irq,
  // cache buffer
  output logic                    req_valid,
  output logic                    req_we,
  output logic [ROW_W-1:0]        req_row,
  output logic [COL_W-1:0]        req_col,
  output logic [BL-1:0][DQ_W-1:0] req_wdata,
  input  logic                    req_ready,
  input  logic                    rd_valid,
  input  logic [BL-1:0][DQ_W-1:0] rd_data,
  input  logic                    prog_done
);

  logic [ROW_W-1:0]        row_q;     // open row (page number)
  logic                    wr_wait;   // WR seen, burst not yet captured
  logic                    rd_wait;   // RD passed on, data not yet returned
  logic                    wr_valid;
  logic [BL-1:0][DQ_W-1:0] wr_data;
  logic                    drv_busy;
  logic                    drv_done;

  dqs_capture #(.DQ_W(DQ_W), .BL(BL)) u_wcap (
    .clk   (clk),
    .rst_n (rst_n),
    .dqs   (dqs_in),
    .dqs_oe(dqs_in_oe),
    .dq    (dq_in),
    .data  (wr_data),
    .valid (wr_valid)
  );

  dqs_drive #(.DQ_W(DQ_W), .BL(BL), .PREAMBLE(PREAMBLE)) u_rdrv (
    .clk   (clk),
    .rst_n (rst_n),
    .start (rd_valid),
    .data  (rd_data),
    .busy  (drv_busy),
    .done  (drv_done),
    .dqs   (dqs_out),
    .dqs_oe(dqs_out_oe),
    .dq    (dq_out),
    .dq_oe (dq_out_oe)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_valid <= 1'b0;
      req_we    <= 1'b0;
      req_row   <= '0;
      row_q     <= '0;
      req_col   <= '0;
      req_wdata <= '0;
      wr_wait   <= 1'b0;
      rd_wait   <= 1'b0;
      irq       <= 1'b0;
    end else begin
      if (req_valid && req_ready) req_valid <= 1'b0;
      unique case (cmd)
        ssd_pkg::DDR_ACT: row_q <= ROW_W'(addr);
        ssd_pkg::DDR_RD: begin
          req_row   <= row_q;
          req_col   <= COL_W'(addr);
          req_we    <= 1'b0;
          req_valid <= 1'b1;
          rd_wait   <= 1'b1;
        end
        ssd_pkg::DDR_WR: begin
          req_row <= row_q;
          req_col <= COL_W'(addr);
          req_we  <= 1'b1;
          wr_wait <= 1'b1;
        end
        default: ;
      endcase
      if (wr_wait && wr_valid) begin
        wr_wait   <= 1'b0;
        req_wdata <= wr_data;
        req_valid <= 1'b1;
      end
      if (drv_done) rd_wait <= 1'b0;
      if (cmd inside {ssd_pkg::DDR_ACT, ssd_pkg::DDR_RD, ssd_pkg::DDR_WR})
        irq <= 1'b0;
      else if (prog_done)
        irq <= 1'b1;
    end
  end

  // The host keeps one burst outstanding: no RD or WR while one is open.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd inside {ssd_pkg::DDR_RD, ssd_pkg::DDR_WR}) |->
      !(rd_wait || wr_wait || req_valid || drv_busy));

endmodule
