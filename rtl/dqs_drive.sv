// dqs_drive: sends one DDR burst with its data strobe.
//
// The DDR bus is modelled at beat rate: one clk cycle is one half period of
// the DDR clock, so DQS changes level every clk cycle while data moves and
// each DQS edge carries one beat. On `start` the block turns the strobe
// driver on, holds DQS low for PREAMBLE cycles (the read preamble), then
// drives beat i with DQS = 1 for even i and 0 for odd i, so that every beat
// begins with a DQS edge. One postamble cycle with DQS low follows, then
// the drivers turn off and `done` pulses.
//
// The SSD uses it to return read data only once the data is really there:
// the host sees no DQS edge until then, which is how the design allows an
// arbitrary CAS latency. The host uses the same block to send write data.
// The beat-rate model, the preamble and the postamble lengths are this
// design's choices; the DDR pads that turn it into double-rate signalling
// are outside this RTL.
//
// Interface: start/data accepted when !busy. Latency from start to the
// first beat: PREAMBLE + 1 cycles. busy lasts PREAMBLE + BL + 1 cycles.
module dqs_drive #(
  parameter int unsigned DQ_W     = ssd_pkg::DQ_W,
  parameter int unsigned BL       = ssd_pkg::BL,
  parameter int unsigned PREAMBLE = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [BL-1:0][DQ_W-1:0] data,
  output logic                    busy,
  output logic                    done,
  output logic                    dqs,
  output logic                    dqs_oe,
  output logic [DQ_W-1:0]         dq,
  output logic                    dq_oe
);

  typedef enum logic [1:0] {IDLE, PRE, BEAT, POST} state_e;

  localparam int unsigned CW = $clog2(PREAMBLE + BL + 1);

  state_e                  state;
  logic [CW-1:0]           cnt;
  logic [BL-1:0][DQ_W-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      buf_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          buf_q <= data;
          cnt   <= '0;
          state <= (PREAMBLE == 0) ? BEAT : PRE;
        end
        PRE: begin
          if (cnt == CW'(PREAMBLE - 1)) begin
            cnt   <= '0;
            state <= BEAT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        BEAT: begin
          if (cnt == CW'(BL - 1)) begin
            cnt   <= '0;
            state <= POST;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        POST: begin
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy   = (state != IDLE);
    dqs_oe = (state != IDLE);
    dqs    = (state == BEAT) && !cnt[0];
    dq_oe  = (state == BEAT);
    dq     = (state == BEAT) ? buf_q[cnt[$clog2(BL)-1:0]] : '0;
  end

endmodule
