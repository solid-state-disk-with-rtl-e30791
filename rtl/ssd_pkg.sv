// ssd_pkg: types and constants shared by the DDR-attached SSD and the DMA
// in the host's DRAM controller.
//
// The DDR bus between host and SSD carries JEDEC-style commands
// ({RAS#, CAS#, WE#} encoding), a row/column address, a 64-bit DQ bus and
// the DQS strobe. The SSD is addressed like a DRAM device: the row address
// is the SSD page number and the column address is the 64-bit beat inside
// the page. The x64 width and burst length 4 follow the document; the
// command encoding, page size and NAND command set are this design's own
// choices, taken from the usual DDR and NAND conventions.
package ssd_pkg;

  // Data bus: x64 DDR DIMM width, burst length 4 (BL 8 is the alternative).
  localparam int unsigned DQ_W       = 64;
  localparam int unsigned BL         = 4;
  localparam int unsigned BEAT_BYTES = DQ_W / 8;

  // SSD page (cache line and NAND page) size.
  localparam int unsigned PAGE_BYTES = 2048;

  // Row (page number) and address bus widths.
  localparam int unsigned ROW_W  = 16;
  localparam int unsigned ADDR_W = 16;

  // DDR command encoding, {RAS#, CAS#, WE#}.
  typedef enum logic [2:0] {
    DDR_ACT = 3'b011,
    DDR_RD  = 3'b101,
    DDR_WR  = 3'b100,
    DDR_PRE = 3'b010,
    DDR_NOP = 3'b111
  } ddr_cmd_e;

  // DMA direction as seen from the host.
  typedef enum logic {
    DMA_READ  = 1'b0,   // SSD -> main memory
    DMA_WRITE = 1'b1    // main memory -> SSD
  } dma_dir_e;

  // The sub-operations of a DMA transfer, as the DMA reports them.
  typedef enum logic [2:0] {
    OP_IDLE     = 3'd0,
    OP_A_CMD    = 3'd1,  // A: DMA command taken from the CPU
    OP_B_PRD    = 3'd2,  // B: PRD entry fetched from main memory
    OP_C_SSD    = 3'd3,  // C: SSD internal transfer (cache buffer / flash)
    OP_D_IF     = 3'd4,  // D: transfer over the SSD interface
    OP_E_MEM    = 3'd5   // E: main memory access
  } dma_op_e;

  // NAND flash command opcodes (ONFI style).
  localparam logic [7:0] NAND_CMD_READ1  = 8'h00;
  localparam logic [7:0] NAND_CMD_READ2  = 8'h30;
  localparam logic [7:0] NAND_CMD_PROG1  = 8'h80;
  localparam logic [7:0] NAND_CMD_PROG2  = 8'h10;

  // One NAND channel, controller side. Every signal is active high and
  // sampled by the flash on the rising clock edge: cle/ale/we qualify io_o
  // as a command, an address or a data byte; re asks for the next byte,
  // which the flash returns on io_i one cycle later.
  typedef struct packed {
    logic       cle;
    logic       ale;
    logic       we;
    logic       re;
    logic [7:0] io_o;
  } nand_out_t;

  // One NAND channel, flash side: returned byte and ready/busy (1 = ready).
  typedef struct packed {
    logic [7:0] io_i;
    logic       rb;
  } nand_in_t;

  // Physical Region Descriptor, one 64-bit word of main memory:
  // [31:0] region base address, [47:32] byte count (0 means 64 KB),
  // [63] end of table.
  typedef struct packed {
    logic        eot;
    logic [14:0] rsvd;
    logic [15:0] count;
    logic [31:0] base;
  } prd_t;

  // Number of bursts in a region: its byte count divided by the burst
  // size in bytes (which takes the place of the sector size).
  function automatic logic [31:0] bursts_of(input logic [15:0] count,
                                            input int unsigned burst_bytes);
    logic [16:0] bytes;
    bytes = (count == 16'd0) ? 17'h10000 : {1'b0, count};
    return 32'(bytes / 17'(burst_bytes));
  endfunction

endpackage
