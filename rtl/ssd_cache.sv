// ssd_cache: cache buffer controller of the SSD (the controller's DRAM
// interface together with the buffer it manages).
//
// Every host access arrives as one burst request from the DDR interface:
// a page number (the DDR row address), the first beat of the burst inside
// the page (the column address) and, for writes, BL data words. The buffer
// holds LINES whole pages and is direct mapped: line = page mod LINES.
//
// Read: on a hit the BL words are read from the buffer and returned on
// rd_data with rd_valid a few cycles later. On a miss the line is taken
// over, the whole page is read from NAND flash through nand_flash_if into
// the line, and the burst is returned after that. The difference in delay
// is what the DDR interface hides behind its DQS signalling.
// Write: the line is taken over without a fetch (the host writes whole
// pages) and the burst is written into it. When the last burst of the page
// arrives, the page is programmed into NAND flash and prog_done pulses when
// the flash reports ready; the host waits for this before it continues, so
// writes reach the flash one after another. The buffer is write-through and
// never holds dirty data, so eviction costs nothing.
//
// The document says the DRAM is used as a cache buffer and that a hit is
// much faster than a miss; the direct mapping, the write-through policy,
// whole-page fills and the buffer size are this design's choices.
// req_ready is high only when idle: one request at a time.
module ssd_cache #(
  parameter int unsigned LINES      = 32,
  parameter int unsigned PAGE_BYTES = ssd_pkg::PAGE_BYTES,
  parameter int unsigned DQ_W       = ssd_pkg::DQ_W,
  parameter int unsigned BL         = ssd_pkg::BL,
  parameter int unsigned ROW_W      = ssd_pkg::ROW_W,
  localparam int unsigned WPP       = PAGE_BYTES / (DQ_W / 8),
  localparam int unsigned COL_W     = $clog2(WPP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // burst requests from the DDR interface
  input  logic                    req_valid,
  input  logic                    req_we,
  input  logic [ROW_W-1:0]        req_row,
  input  logic [COL_W-1:0]        req_col,
  input  logic [BL-1:0][DQ_W-1:0] req_wdata,
  output logic                    req_ready,
  output logic                    rd_valid,
  output logic [BL-1:0][DQ_W-1:0] rd_data,
  output logic                    prog_done,
  // lookup outcome, one pulse per read request
  output logic                    hit,
  output logic                    miss,
  // NAND flash interface
  output logic                    nf_req_valid,
  output logic                    nf_req_prog,
  output logic [ROW_W-1:0]        nf_req_page,
  input  logic                    nf_req_ready,
  input  logic                    nf_done,
  input  logic                    nf_fill_valid,
  input  logic [COL_W-1:0]        nf_fill_idx,
  input  logic [DQ_W-1:0]         nf_fill_data,
  input  logic                    nf_pd_req,
  input  logic [COL_W-1:0]        nf_pd_idx,
  output logic [DQ_W-1:0]         nf_pd_data
);

  localparam int unsigned LN_W  = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int unsigned MA_W  = $clog2(LINES * WPP);
  localparam int unsigned BLW   = $clog2(BL);

  typedef enum logic [2:0] {
    IDLE, NF_RD, FILL, RD_MEM, WR_MEM, NF_PG, PROG
  } state_e;

  state_e                  state;
  logic [ROW_W-1:0]        tag_q   [LINES];
  logic [LINES-1:0]        valid_q;
  logic [ROW_W-1:0]        row_q;
  logic [COL_W-1:0]        col_q;
  logic [BL-1:0][DQ_W-1:0] wbuf_q;
  logic [LN_W-1:0]         line_q;
  logic [BLW:0]            k;        // beat counter for RD_MEM / WR_MEM
  logic                    rd_pend;  // a read word arrives from the memory

  logic [LN_W-1:0]         req_line;
  logic                    req_hit;

  assign req_line = LN_W'(req_row % LINES);
  assign req_hit  = valid_q[req_line] && (tag_q[req_line] == req_row);

  // buffer port
  logic               m_en, m_we;
  logic [MA_W-1:0]    m_addr;
  logic [DQ_W-1:0]    m_wdata, m_rdata;

  ssd_cache_mem #(.DQ_W(DQ_W), .WORDS(LINES * WPP)) u_mem (
    .clk  (clk),
    .en   (m_en),
    .we   (m_we),
    .addr (m_addr),
    .wdata(m_wdata),
    .rdata(m_rdata)
  );

  always_comb begin
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_addr  = {line_q, col_q};
    m_wdata = '0;
    unique case (state)
      FILL: begin
        m_en    = nf_fill_valid;
        m_we    = 1'b1;
        m_addr  = {line_q, nf_fill_idx};
        m_wdata = nf_fill_data;
      end
      RD_MEM: begin
        m_en   = (k < (BLW+1)'(BL));
        m_addr = {line_q, col_q + COL_W'(k)};
      end
      WR_MEM: begin
        m_en    = 1'b1;
        m_we    = 1'b1;
        m_addr  = {line_q, col_q + COL_W'(k)};
        m_wdata = wbuf_q[k[BLW-1:0]];
      end
      PROG: begin
        m_en   = nf_pd_req;
        m_addr = {line_q, nf_pd_idx};
      end
      default: ;
    endcase
  end

  assign nf_pd_data = m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      valid_q      <= '0;
      row_q        <= '0;
      col_q        <= '0;
      wbuf_q       <= '0;
      line_q       <= '0;
      k            <= '0;
      rd_pend      <= 1'b0;
      rd_valid     <= 1'b0;
      rd_data      <= '0;
      prog_done    <= 1'b0;
      hit          <= 1'b0;
      miss         <= 1'b0;
      nf_req_valid <= 1'b0;
      nf_req_prog  <= 1'b0;
      for (int i = 0; i < LINES; i++) tag_q[i] <= '0;
    end else begin
      rd_valid  <= 1'b0;
      prog_done <= 1'b0;
      hit       <= 1'b0;
      miss      <= 1'b0;
      unique case (state)
        IDLE: if (req_valid) begin
          row_q  <= req_row;
          col_q  <= req_col;
          wbuf_q <= req_wdata;
          line_q <= req_line;
          k      <= '0;
          if (req_we) begin
            if (tag_q[req_line] != req_row) begin
              tag_q[req_line]   <= req_row;
              valid_q[req_line] <= 1'b0;
            end
            state <= WR_MEM;
          end else if (req_hit) begin
            hit   <= 1'b1;
            state <= RD_MEM;
          end else begin
            miss              <= 1'b1;
            tag_q[req_line]   <= req_row;
            valid_q[req_line] <= 1'b0;
            nf_req_valid      <= 1'b1;
            nf_req_prog       <= 1'b0;
            state             <= NF_RD;
          end
        end
        NF_RD: if (nf_req_ready) begin
          // the interface has taken the request in this cycle
          nf_req_valid <= 1'b0;
          state        <= FILL;
        end
        FILL: if (nf_done) begin
          valid_q[line_q] <= 1'b1;
          k               <= '0;
          state           <= RD_MEM;
        end
        RD_MEM: begin
          if (k < (BLW+1)'(BL)) k <= k + 1'b1;
          rd_pend <= (k < (BLW+1)'(BL));
          if (rd_pend) begin
            rd_data[k[BLW-1:0] - 1'b1] <= m_rdata;
            if (k == (BLW+1)'(BL)) begin
              rd_valid <= 1'b1;
              rd_pend  <= 1'b0;
              state    <= IDLE;
            end
          end
        end
        WR_MEM: begin
          k <= k + 1'b1;
          if (k == (BLW+1)'(BL - 1)) begin
            if (col_q == COL_W'(WPP - BL)) begin
              valid_q[line_q] <= 1'b1;
              nf_req_valid    <= 1'b1;
              nf_req_prog     <= 1'b1;
              state           <= NF_PG;
            end else begin
              state <= IDLE;
            end
          end
        end
        NF_PG: if (nf_req_ready) begin
          nf_req_valid <= 1'b0;
          state        <= PROG;
        end
        PROG: if (nf_done) begin
          prog_done <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign req_ready   = (state == IDLE);
  assign nf_req_page = row_q;

endmodule
