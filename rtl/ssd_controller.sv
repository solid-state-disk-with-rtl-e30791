// ssd_controller: the SSD that sits on a DDR DRAM port.
//
// Ties together the DDR host interface (ssd_ddr_if), the cache buffer and
// its controller (ssd_cache), the NAND flash interface (nand_flash_if) and
// the controller SRAM (ssd_sram). A host burst request flows
//   DDR bus -> ssd_ddr_if -> ssd_cache -> (on a miss or a page program)
//   nand_flash_if -> NAND channels
// and read data go back the same way, leaving on DQ with the DQS strobe
// only when they are ready. The structure follows the document's SSD
// block diagram with the host interface replaced by the DDR interface; the
// processor that runs the flash translation firmware is not part of this
// RTL, so the SSD maps host pages one to one onto flash pages and the SRAM
// port is brought out for it.
//
// cache_hit / cache_miss pulse once per read burst with the lookup result.
module ssd_controller
  import ssd_pkg::ddr_cmd_e, ssd_pkg::nand_out_t, ssd_pkg::nand_in_t;
#(
  parameter int unsigned DQ_W        = ssd_pkg::DQ_W,
  parameter int unsigned BL          = ssd_pkg::BL,
  parameter int unsigned ROW_W       = ssd_pkg::ROW_W,
  parameter int unsigned ADDR_W      = ssd_pkg::ADDR_W,
  parameter int unsigned PAGE_BYTES  = ssd_pkg::PAGE_BYTES,
  parameter int unsigned CACHE_LINES = 32,
  parameter int unsigned CHANNELS    = 4,
  parameter int unsigned SRAM_WORDS  = 16384,
  parameter int unsigned PREAMBLE    = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DDR bus
  input  ddr_cmd_e                      cmd,
  input  logic [ADDR_W-1:0]             addr,
  input  logic [DQ_W-1:0]               dq_in,
  input  logic                          dqs_in,
  input  logic                          dqs_in_oe,
  output logic [DQ_W-1:0]               dq_out,
  output logic                          dq_out_oe,
  output logic                          dqs_out,
  output logic                          dqs_out_oe,
  output logic                          irq,
  // NAND flash channels
  output nand_out_t                     nand_o [CHANNELS],
  input  nand_in_t                      nand_i [CHANNELS],
  // processor port of the SRAM
  input  logic                          sram_en,
  input  logic [3:0]                    sram_we,
  input  logic [$clog2(SRAM_WORDS)-1:0] sram_addr,
  input  logic [31:0]                   sram_wdata,
  output logic [31:0]                   sram_rdata,
  // cache lookup outcome
  output logic                          cache_hit,
  output logic                          cache_miss
);

  localparam int unsigned COL_W = $clog2(PAGE_BYTES / (DQ_W / 8));

  logic                    req_valid, req_we, req_ready, rd_valid, prog_done;
  logic [ROW_W-1:0]        req_row;
  logic [COL_W-1:0]        req_col;
  logic [BL-1:0][DQ_W-1:0] req_wdata, rd_data;

  logic                    nf_req_valid, nf_req_prog, nf_req_ready, nf_done;
  logic [ROW_W-1:0]        nf_req_page;
  logic                    nf_fill_valid, nf_pd_req;
  logic [COL_W-1:0]        nf_fill_idx, nf_pd_idx;
  logic [DQ_W-1:0]         nf_fill_data, nf_pd_data;

  ssd_ddr_if #(
    .DQ_W(DQ_W), .BL(BL), .ROW_W(ROW_W), .ADDR_W(ADDR_W),
    .PAGE_BYTES(PAGE_BYTES), .PREAMBLE(PREAMBLE)
  ) u_ddr_if (
    .clk, .rst_n,
    .cmd, .addr, .dq_in, .dqs_in, .dqs_in_oe,
    .dq_out, .dq_out_oe, .dqs_out, .dqs_out_oe, .irq,
    .req_valid, .req_we, .req_row, .req_col, .req_wdata, .req_ready,
    .rd_valid, .rd_data, .prog_done
  );

  ssd_cache #(
    .LINES(CACHE_LINES), .PAGE_BYTES(PAGE_BYTES), .DQ_W(DQ_W), .BL(BL),
    .ROW_W(ROW_W)
  ) u_cache (
    .clk, .rst_n,
    .req_valid, .req_we, .req_row, .req_col, .req_wdata, .req_ready,
    .rd_valid, .rd_data, .prog_done,
    .hit (cache_hit),
    .miss(cache_miss),
    .nf_req_valid, .nf_req_prog, .nf_req_page, .nf_req_ready, .nf_done,
    .nf_fill_valid, .nf_fill_idx, .nf_fill_data,
    .nf_pd_req, .nf_pd_idx, .nf_pd_data
  );

  nand_flash_if #(
    .CHANNELS(CHANNELS), .PAGE_BYTES(PAGE_BYTES), .DQ_W(DQ_W), .ROW_W(ROW_W)
  ) u_nand_if (
    .clk, .rst_n,
    .req_valid (nf_req_valid),
    .req_prog  (nf_req_prog),
    .req_page  (nf_req_page),
    .req_ready (nf_req_ready),
    .done      (nf_done),
    .fill_valid(nf_fill_valid),
    .fill_idx  (nf_fill_idx),
    .fill_data (nf_fill_data),
    .pd_req    (nf_pd_req),
    .pd_idx    (nf_pd_idx),
    .pd_data   (nf_pd_data),
    .nand_o, .nand_i
  );

  ssd_sram #(.WORDS(SRAM_WORDS), .W(32)) u_sram (
    .clk,
    .en   (sram_en),
    .we   (sram_we),
    .addr (sram_addr),
    .wdata(sram_wdata),
    .rdata(sram_rdata)
  );

endmodule
