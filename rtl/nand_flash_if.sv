// nand_flash_if: NAND flash interface of the SSD controller.
//
// Moves one SSD page between the cache buffer and the NAND flash. Pages are
// striped over CHANNELS channels: the low bits of the page number select
// the channel, the rest is the page (row) address inside that channel's
// flash. A page read sends READ1 (00h), two column and three row address
// bytes, READ2 (30h), waits for ready, then toggles `re` once per byte and
// packs the returned bytes, lowest first, into 64-bit words that leave on
// the fill port with their word index. A page program sends PROG1 (80h) and
// the five address bytes, fetches each word from the cache buffer over the
// pd_* port (data one cycle after pd_req), sends its eight bytes, sends
// PROG2 (10h) and waits for ready. `done` pulses when the page is finished.
//
// The document names the block and says it supports multiple channels and
// ways; the byte-wide channel, the command set (the usual ONFI one, with
// active-high strobes on a synchronous bus) and one page operation at a
// time are this design's choices. Ways (several dies per channel) are not
// modelled.
module nand_flash_if
  import ssd_pkg::nand_out_t, ssd_pkg::nand_in_t;
#(
  parameter int unsigned CHANNELS   = 4,
  parameter int unsigned PAGE_BYTES = ssd_pkg::PAGE_BYTES,
  parameter int unsigned DQ_W       = ssd_pkg::DQ_W,
  parameter int unsigned ROW_W      = ssd_pkg::ROW_W,
  localparam int unsigned WPP       = PAGE_BYTES / (DQ_W / 8),
  localparam int unsigned WI_W      = $clog2(WPP)
) (
  input  logic               clk,
  input  logic               rst_n,
  // page request from the cache controller
  input  logic               req_valid,
  input  logic               req_prog,
  input  logic [ROW_W-1:0]   req_page,
  output logic               req_ready,
  output logic               done,
  // read data to the cache buffer
  output logic               fill_valid,
  output logic [WI_W-1:0]    fill_idx,
  output logic [DQ_W-1:0]    fill_data,
  // program data from the cache buffer
  output logic               pd_req,
  output logic [WI_W-1:0]    pd_idx,
  input  logic [DQ_W-1:0]    pd_data,
  // flash channels
  output nand_out_t          nand_o [CHANNELS],
  input  nand_in_t           nand_i [CHANNELS]
);

  localparam int unsigned BPW   = DQ_W / 8;
  localparam int unsigned CH_W  = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;
  localparam int unsigned PB_W  = $clog2(PAGE_BYTES + 1);
  localparam int unsigned BI_W  = $clog2(BPW);

  typedef enum logic [3:0] {
    IDLE, HDR, WAIT_B, WAIT_R, RD_DATA, PD_FETCH, PD_LATCH, PD_SEND, DONE
  } state_e;

  state_e            state;
  logic              prog_q;
  logic [CH_W-1:0]   ch_q;
  logic [23:0]       row_q;
  logic [2:0]        step;        // header byte index 0..6
  logic [PB_W-1:0]   issued;      // bytes requested (read) or sent (program)
  logic [PB_W-1:0]   got;         // bytes received (read)
  logic              re_q;        // a byte is due on io_i this cycle
  logic [DQ_W-1:0]   word_q;      // byte assembly / program shift register
  logic [BI_W-1:0]   bsel;        // byte within the word being sent
  logic [WI_W-1:0]   widx;        // word being sent (program)
  nand_out_t         drv;         // what the selected channel sees

  // Header bytes: command, 2 column bytes (always 0: whole pages), 3 row
  // bytes, second command (read only; program sends it after the data).
  function automatic logic [7:0] hdr_byte(input logic [2:0] s, input logic p,
                                          input logic [23:0] row);
    unique case (s)
      3'd0:    return p ? ssd_pkg::NAND_CMD_PROG1 : ssd_pkg::NAND_CMD_READ1;
      3'd1,
      3'd2:    return 8'h00;
      3'd3:    return row[7:0];
      3'd4:    return row[15:8];
      3'd5:    return row[23:16];
      default: return p ? ssd_pkg::NAND_CMD_PROG2 : ssd_pkg::NAND_CMD_READ2;
    endcase
  endfunction

  logic rb_sel;
  logic [7:0] io_sel;
  always_comb begin
    rb_sel = 1'b1;
    io_sel = '0;
    for (int c = 0; c < CHANNELS; c++) begin
      if (CH_W'(c) == ch_q) begin
        rb_sel = nand_i[c].rb;
        io_sel = nand_i[c].io_i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      prog_q     <= 1'b0;
      ch_q       <= '0;
      row_q      <= '0;
      step       <= '0;
      issued     <= '0;
      got        <= '0;
      re_q       <= 1'b0;
      word_q     <= '0;
      bsel       <= '0;
      widx       <= '0;
      done       <= 1'b0;
      fill_valid <= 1'b0;
      fill_idx   <= '0;
      fill_data  <= '0;
    end else begin
      done       <= 1'b0;
      fill_valid <= 1'b0;
      re_q       <= 1'b0;
      unique case (state)
        IDLE: if (req_valid) begin
          prog_q <= req_prog;
          ch_q   <= CH_W'(req_page % CHANNELS);
          row_q  <= 24'(req_page / CHANNELS);
          step   <= '0;
          issued <= '0;
          got    <= '0;
          bsel   <= '0;
          widx   <= '0;
          state  <= HDR;
        end
        HDR: begin
          step <= step + 1'b1;
          if (step == 3'd5 && prog_q) state <= PD_FETCH;
          if (step == 3'd6)           state <= WAIT_B;
        end
        WAIT_B: state <= WAIT_R;
        WAIT_R: if (rb_sel) state <= prog_q ? DONE : RD_DATA;
        RD_DATA: begin
          if (issued != PB_W'(PAGE_BYTES)) begin
            issued <= issued + 1'b1;
            re_q   <= 1'b1;
          end
          if (re_q) begin
            word_q <= {io_sel, word_q[DQ_W-1:8]};
            got    <= got + 1'b1;
            if (got[BI_W-1:0] == BI_W'(BPW - 1)) begin
              fill_valid <= 1'b1;
              fill_idx   <= WI_W'(got / BPW);
              fill_data  <= {io_sel, word_q[DQ_W-1:8]};
            end
            if (got == PB_W'(PAGE_BYTES - 1)) state <= DONE;
          end
        end
        PD_FETCH: state <= PD_LATCH;
        PD_LATCH: begin
          word_q <= pd_data;
          bsel   <= '0;
          state  <= PD_SEND;
        end
        PD_SEND: begin
          word_q <= word_q >> 8;
          bsel   <= bsel + 1'b1;
          issued <= issued + 1'b1;
          if (bsel == BI_W'(BPW - 1)) begin
            widx <= widx + 1'b1;
            if (issued == PB_W'(PAGE_BYTES - 1)) begin
              step  <= 3'd6;
              state <= HDR;
            end else begin
              state <= PD_FETCH;
            end
          end
        end
        DONE: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Strobes for the selected channel.
  always_comb begin
    drv = '0;
    unique case (state)
      HDR: begin
        drv.io_o = hdr_byte(step, prog_q, row_q);
        drv.cle  = (step == 3'd0) || (step == 3'd6);
        drv.ale  = !drv.cle;
        drv.we   = 1'b1;
      end
      RD_DATA: drv.re = (issued != PB_W'(PAGE_BYTES));
      PD_SEND: begin
        drv.io_o = word_q[7:0];
        drv.we   = 1'b1;
      end
      default: ;
    endcase
    for (int c = 0; c < CHANNELS; c++) begin
      nand_o[c] = (CH_W'(c) == ch_q) ? drv : '0;
    end
  end

  assign req_ready = (state == IDLE);
  assign pd_req    = (state == PD_FETCH);
  assign pd_idx    = widx;

endmodule
