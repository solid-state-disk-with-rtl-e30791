// ssd_cache_mem: storage of the SSD cache buffer.
//
// In the SSD the cache buffer is a DRAM behind the controller's DRAM
// interface; here it is an on-chip array of WORDS 64-bit words with one
// read/write port, which is enough because the cache controller serves one
// request at a time. Writes take effect at the clock edge; a read returns
// the addressed word on rdata one cycle after `en` with `we` low.
// The size is this design's choice: the default holds 32 pages of 2 KB,
// which is one 64 KB transfer.
module ssd_cache_mem #(
  parameter int unsigned DQ_W  = ssd_pkg::DQ_W,
  parameter int unsigned WORDS = 8192
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [DQ_W-1:0]          wdata,
  output logic [DQ_W-1:0]          rdata
);

  logic [DQ_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
