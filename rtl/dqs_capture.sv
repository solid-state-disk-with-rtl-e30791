// dqs_capture: receives one DDR burst on the edges of its data strobe.
//
// Beat-rate model of the DDR bus (one clk cycle per DQS half period, see
// dqs_drive). While the sender drives DQS (dqs_oe = 1) every change of the
// DQS level marks one data beat, which is taken from dq in that cycle. The
// level DQS had before the driver turned on counts as low, so the first
// rising edge after the preamble is beat 0. When BL beats have arrived the
// burst is presented on `data` with a one-cycle `valid` pulse.
//
// The receiver never counts clock cycles from the command: it waits for the
// strobe, however long that takes. That is what lets the SSD return read
// data after a cache hit or after a NAND read with the same bus protocol.
// Valid rises one cycle after the last beat.
module dqs_capture #(
  parameter int unsigned DQ_W = ssd_pkg::DQ_W,
  parameter int unsigned BL   = ssd_pkg::BL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    dqs,
  input  logic                    dqs_oe,
  input  logic [DQ_W-1:0]         dq,
  output logic [BL-1:0][DQ_W-1:0] data,
  output logic                    valid
);

  localparam int unsigned BW = $clog2(BL);

  logic          dqs_prev;
  logic [BW-1:0] beat;
  logic          edge_seen;

  assign edge_seen = dqs_oe && (dqs != dqs_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dqs_prev <= 1'b0;
      beat     <= '0;
      data     <= '0;
      valid    <= 1'b0;
    end else begin
      valid    <= 1'b0;
      dqs_prev <= dqs_oe ? dqs : 1'b0;
      if (!dqs_oe) begin
        beat <= '0;
      end else if (edge_seen) begin
        data[beat] <= dq;
        beat       <= beat + 1'b1;
        if (beat == BW'(BL - 1)) valid <= 1'b1;
      end
    end
  end

endmodule
