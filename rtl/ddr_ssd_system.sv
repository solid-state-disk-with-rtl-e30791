// ddr_ssd_system: an SSD attached to the North Bridge through a DDR DRAM
// port, with the DMA of the North Bridge DRAM controller that serves it.
//
// The CPU hands a DMA command to the DRAM controller's DMA (nb_ssd_dma),
// which fetches the PRD table and moves the data between main memory and
// the SSD (ssd_controller) over a DDR bus, with no South Bridge or SATA
// link in the path. Reads wait on the SSD's DQS strobe, so one bus serves
// both cache-buffer hits and slow flash reads. Main memory, the CPU, the
// NAND flash devices and the SSD's processor lie outside: their signals
// are the ports of this module.
//
// The DDR bus between the two halves is internal and modelled at beat rate
// (one clk cycle per DQS half period); DQ and DQS appear as one wire set
// per direction instead of bidirectional pins. The receivers need only the
// DQS enables; the DQ enables, which would turn the pad drivers around, are
// left open here.
module ddr_ssd_system
  import ssd_pkg::dma_dir_e, ssd_pkg::dma_op_e, ssd_pkg::nand_out_t, ssd_pkg::nand_in_t,
         ssd_pkg::ddr_cmd_e;
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
  // CPU: DMA command and completion
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  dma_dir_e                      cmd_dir,
  input  logic [31:0]                   cmd_ssd_addr,
  input  logic [31:0]                   cmd_prd_base,
  output logic                          dma_done,
  output dma_op_e                       dma_op,
  // main memory
  output logic                          mem_req,
  output logic                          mem_we,
  output logic [31:0]                   mem_addr,
  output logic [DQ_W-1:0]               mem_wdata,
  input  logic                          mem_gnt,
  input  logic                          mem_rvalid,
  input  logic [DQ_W-1:0]               mem_rdata,
  // NAND flash channels
  output nand_out_t                     nand_o [CHANNELS],
  input  nand_in_t                      nand_i [CHANNELS],
  // SSD processor port of the SRAM
  input  logic                          sram_en,
  input  logic [3:0]                    sram_we,
  input  logic [$clog2(SRAM_WORDS)-1:0] sram_addr,
  input  logic [31:0]                   sram_wdata,
  output logic [31:0]                   sram_rdata,
  // SSD status
  output logic                          ssd_irq,
  output logic                          cache_hit,
  output logic                          cache_miss
);

  ddr_cmd_e          ddr_cmd;
  logic [ADDR_W-1:0] ddr_addr;
  logic [DQ_W-1:0]   dq_h2s, dq_s2h;
  logic              dqs_h2s, dqs_h2s_oe, dqs_s2h, dqs_s2h_oe;

  nb_ssd_dma #(
    .DQ_W(DQ_W), .BL(BL), .ROW_W(ROW_W), .ADDR_W(ADDR_W),
    .PAGE_BYTES(PAGE_BYTES), .PREAMBLE(PREAMBLE)
  ) u_dma (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_dir, .cmd_ssd_addr, .cmd_prd_base,
    .done(dma_done),
    .op  (dma_op),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ddr_cmd, .ddr_addr,
    .dq_out    (dq_h2s),
    .dq_out_oe (),
    .dqs_out   (dqs_h2s),
    .dqs_out_oe(dqs_h2s_oe),
    .dq_in     (dq_s2h),
    .dqs_in    (dqs_s2h),
    .dqs_in_oe (dqs_s2h_oe),
    .ssd_irq
  );

  ssd_controller #(
    .DQ_W(DQ_W), .BL(BL), .ROW_W(ROW_W), .ADDR_W(ADDR_W),
    .PAGE_BYTES(PAGE_BYTES), .CACHE_LINES(CACHE_LINES), .CHANNELS(CHANNELS),
    .SRAM_WORDS(SRAM_WORDS), .PREAMBLE(PREAMBLE)
  ) u_ssd (
    .clk, .rst_n,
    .cmd       (ddr_cmd),
    .addr      (ddr_addr),
    .dq_in     (dq_h2s),
    .dqs_in    (dqs_h2s),
    .dqs_in_oe (dqs_h2s_oe),
    .dq_out    (dq_s2h),
    .dq_out_oe (),
    .dqs_out   (dqs_s2h),
    .dqs_out_oe(dqs_s2h_oe),
    .irq       (ssd_irq),
    .nand_o, .nand_i,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .cache_hit, .cache_miss
  );

endmodule
