// ssd_sram: the SRAM of the SSD controller.
//
// Working memory of the controller's processor (the processor and its
// flash translation firmware are not part of this RTL, so the port is
// brought out of the SSD for it). One read/write port of WORDS 32-bit
// words with byte write enables. A read returns the word one cycle after
// `en` with `we` all zero; a write updates the enabled bytes at the clock
// edge. The document only names the SRAM; the size, width and byte enables
// are this design's choices.
module ssd_sram #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic [W/8-1:0]   we,
  input  logic [AW-1:0]    addr,
  input  logic [W-1:0]     wdata,
  output logic [W-1:0]     rdata
);

  logic [W/8-1:0][7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int b = 0; b < W / 8; b++) begin
        if (we[b]) mem[addr][b] <= wdata[8*b +: 8];
      end
      if (we == '0) rdata <= mem[addr];
    end
  end

endmodule
