// nb_ssd_dma: DMA engine in the North Bridge DRAM controller that moves
// data between main memory and an SSD on a DDR DRAM port.
//
// The CPU gives one DMA command (direction, SSD byte address, address of a
// Physical Region Descriptor table). The table lists the main-memory
// regions of the transfer; each entry's byte count is divided by the burst
// size (BL beats of 8 bytes) to give the number of DDR bursts for that
// region, as a SATA DMA divides it by the sector size. The DMA then works
// burst by burst:
//
//   read  (SSD -> memory), per burst C -> D -> B -> E:
//     ACT (if the SSD page changes) and RD to the SSD, wait for the SSD's
//     DQS strobe however long it takes (C, then D while the burst arrives),
//     fetch the next PRD entry if the current region is used up (B), write
//     the BL words to memory (E). Reads are pipelined: as soon as a burst
//     has been taken from the capture register, the RD for the next burst
//     goes out, so the SSD works on it while this one is written to memory.
//   write (memory -> SSD), per burst B -> E -> D -> C:
//     fetch the next PRD entry if needed (B), read BL words from memory (E),
//     ACT if needed, WR and drive the burst with DQS (D); after the last
//     burst of an SSD page wait for the SSD's irq, which says the page is
//     in flash (C), so that writes are strictly sequential.
//
// `op` reports which of these sub-operations is under way (A: the cycle
// the command is taken). `done` pulses when the entry marked end-of-table
// is finished. The order of the sub-operations, waiting on DQS instead of a
// fixed CAS latency, the burst conversion, pipelined reads and sequential
// writes follow the document; running the reads exactly one burst ahead,
// the PRD format (that of the usual IDE bus-master DMA), the memory port
// handshake (req held until gnt, read data later with rvalid, one read
// outstanding) and the page mapping of SSD addresses are this design's
// choices. Transfers are assumed to cover whole bursts, and for
// writes whole SSD pages.
module nb_ssd_dma
  import ssd_pkg::ddr_cmd_e, ssd_pkg::dma_dir_e, ssd_pkg::dma_op_e, ssd_pkg::prd_t;
#(
  parameter int unsigned DQ_W       = ssd_pkg::DQ_W,
  parameter int unsigned BL         = ssd_pkg::BL,
  parameter int unsigned ROW_W      = ssd_pkg::ROW_W,
  parameter int unsigned ADDR_W     = ssd_pkg::ADDR_W,
  parameter int unsigned PAGE_BYTES = ssd_pkg::PAGE_BYTES,
  parameter int unsigned PREAMBLE   = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DMA command from the CPU
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  dma_dir_e             cmd_dir,
  input  logic [31:0]          cmd_ssd_addr,
  input  logic [31:0]          cmd_prd_base,
  output logic                 done,
  output dma_op_e              op,
  // main memory port
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [31:0]          mem_addr,
  output logic [DQ_W-1:0]      mem_wdata,
  input  logic                 mem_gnt,
  input  logic                 mem_rvalid,
  input  logic [DQ_W-1:0]      mem_rdata,
  // DDR bus to the SSD
  output ddr_cmd_e             ddr_cmd,
  output logic [ADDR_W-1:0]    ddr_addr,
  output logic [DQ_W-1:0]      dq_out,
  output logic                 dq_out_oe,
  output logic                 dqs_out,
  output logic                 dqs_out_oe,
  input  logic [DQ_W-1:0]      dq_in,
  input  logic                 dqs_in,
  input  logic                 dqs_in_oe,
  input  logic                 ssd_irq
);

  localparam int unsigned BEAT_B  = DQ_W / 8;
  localparam int unsigned BURST_B = BL * BEAT_B;
  localparam int unsigned WPP     = PAGE_BYTES / BEAT_B;
  localparam int unsigned COL_W   = $clog2(WPP);
  localparam int unsigned BO_W    = $clog2(BEAT_B);
  localparam int unsigned BLW     = $clog2(BL);

  typedef enum logic [3:0] {
    S_IDLE, S_CMD, S_ACT, S_RW, S_RWAIT, S_WDRV, S_IRQ,
    S_PRD_REQ, S_PRD_WAIT, S_MEMW, S_MEMR_REQ, S_MEMR_WAIT, S_NEXT, S_DONE
  } state_e;

  state_e                  state;
  dma_dir_e                dir_q;
  logic [31:0]             ssd_a;      // SSD byte address of this burst
  logic [31:0]             mem_a;      // memory byte address of this burst
  logic [31:0]             prd_ptr;
  logic                    need_prd;
  logic                    eot_q;
  logic [31:0]             bursts_left;
  logic                    row_open;
  logic [ROW_W-1:0]        open_row;
  logic [BLW:0]            k;
  logic [BL-1:0][DQ_W-1:0] buf_q;
  logic                    seen_dqs;   // read: the SSD strobe has started

  // read issue side: ACT/RD run ahead of the memory writes by one burst
  typedef enum logic [1:0] {I_IDLE, I_ACT, I_RD} iss_e;
  iss_e                    iss_st;
  logic [31:0]             iss_a;       // SSD byte address of the next RD
  logic [31:0]             issued;      // RDs sent in this transfer
  logic [31:0]             region_end;  // bursts up to the end of the last PRD read
  logic                    prd_loaded;
  logic                    rd_inflight; // RD sent, its burst not yet captured
  logic                    cap_full;    // capture register holds an unread burst
  logic                    rd_active;
  logic                    more_rd;
  logic [ROW_W-1:0]        iss_row;
  logic [COL_W-1:0]        iss_col;

  logic [ROW_W-1:0]        cur_row;
  logic [COL_W-1:0]        cur_col;
  logic                    page_end;
  prd_t                    prd;

  assign cur_row  = ssd_a[BO_W+COL_W +: ROW_W];
  assign cur_col  = ssd_a[BO_W +: COL_W];
  assign page_end = (cur_col == COL_W'(WPP - BL));
  assign prd      = prd_t'(mem_rdata[63:0]);
  assign iss_row  = iss_a[BO_W+COL_W +: ROW_W];
  assign iss_col  = iss_a[BO_W +: COL_W];

  // A transfer has a next burst while the PRD entries read so far hold
  // more, or, once they are used up, if the last one read is not the end of
  // the table (the next region holds at least one burst). How many more
  // that region holds is known only when its entry has been read, so the
  // issue side runs at most one burst into a region not yet read; before
  // the first entry is read, only the first burst is known to exist.
  assign rd_active = (dir_q == ssd_pkg::DMA_READ) &&
                     (state != S_IDLE) && (state != S_CMD) && (state != S_DONE);
  assign more_rd   = (issued == 32'd0) ||
                     (prd_loaded && ((issued < region_end) ||
                                     ((issued == region_end) && !eot_q)));

  // read data capture on the SSD's strobe, write data drive with our own
  logic                    cap_valid;
  logic [BL-1:0][DQ_W-1:0] cap_data;
  logic                    drv_start, drv_busy, drv_done;

  dqs_capture #(.DQ_W(DQ_W), .BL(BL)) u_rcap (
    .clk, .rst_n,
    .dqs   (dqs_in),
    .dqs_oe(dqs_in_oe),
    .dq    (dq_in),
    .data  (cap_data),
    .valid (cap_valid)
  );

  assign drv_start = (state == S_RW) && (dir_q == ssd_pkg::DMA_WRITE);

  dqs_drive #(.DQ_W(DQ_W), .BL(BL), .PREAMBLE(PREAMBLE)) u_wdrv (
    .clk, .rst_n,
    .start (drv_start),
    .data  (buf_q),
    .busy  (drv_busy),
    .done  (drv_done),
    .dqs   (dqs_out),
    .dqs_oe(dqs_out_oe),
    .dq    (dq_out),
    .dq_oe (dq_out_oe)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      dir_q       <= ssd_pkg::DMA_READ;
      ssd_a       <= '0;
      mem_a       <= '0;
      prd_ptr     <= '0;
      need_prd    <= 1'b0;
      eot_q       <= 1'b0;
      bursts_left <= '0;
      row_open    <= 1'b0;
      open_row    <= '0;
      k           <= '0;
      buf_q       <= '0;
      seen_dqs    <= 1'b0;
      done        <= 1'b0;
      iss_st      <= I_IDLE;
      iss_a       <= '0;
      issued      <= '0;
      region_end  <= '0;
      prd_loaded  <= 1'b0;
      rd_inflight <= 1'b0;
      cap_full    <= 1'b0;
    end else begin
      done <= 1'b0;

      // read issue side
      unique case (iss_st)
        I_IDLE: if (rd_active && !rd_inflight && !cap_full && more_rd) iss_st <= I_ACT;
        I_ACT: begin
          if (!row_open || open_row != iss_row) begin
            row_open <= 1'b1;
            open_row <= iss_row;
          end
          iss_st <= I_RD;
        end
        I_RD: begin
          rd_inflight <= 1'b1;
          issued      <= issued + 32'd1;
          iss_a       <= iss_a + 32'(BURST_B);
          iss_st      <= I_IDLE;
        end
        default: iss_st <= I_IDLE;
      endcase
      if (cap_valid) begin
        rd_inflight <= 1'b0;
        cap_full    <= 1'b1;
      end

      unique case (state)
        S_IDLE: if (cmd_valid) begin
          dir_q    <= cmd_dir;
          ssd_a    <= cmd_ssd_addr;
          prd_ptr  <= cmd_prd_base;
          need_prd <= 1'b1;
          row_open <= 1'b0;
          iss_a       <= cmd_ssd_addr;
          issued      <= '0;
          region_end  <= '0;
          prd_loaded  <= 1'b0;
          rd_inflight <= 1'b0;
          cap_full    <= 1'b0;
          seen_dqs    <= 1'b0;
          state    <= S_CMD;
        end
        S_CMD: state <= (dir_q == ssd_pkg::DMA_READ) ? S_RWAIT : S_PRD_REQ;
        S_ACT: begin
          if (!row_open || open_row != cur_row) begin
            row_open <= 1'b1;
            open_row <= cur_row;
          end
          state <= S_RW;
        end
        S_RW: state <= S_WDRV;
        S_RWAIT: begin
          if (dqs_in_oe) seen_dqs <= 1'b1;
          if (cap_full) begin
            buf_q    <= cap_data;
            cap_full <= 1'b0;
            seen_dqs <= 1'b0;
            k        <= '0;
            state    <= need_prd ? S_PRD_REQ : S_MEMW;
          end
        end
        S_WDRV: if (drv_done) state <= page_end ? S_IRQ : S_NEXT;
        S_IRQ:  if (ssd_irq)  state <= S_NEXT;
        S_PRD_REQ: if (mem_gnt) state <= S_PRD_WAIT;
        S_PRD_WAIT: if (mem_rvalid) begin
          mem_a       <= prd.base;
          bursts_left <= ssd_pkg::bursts_of(prd.count, BURST_B);
          eot_q       <= prd.eot;
          region_end  <= region_end + ssd_pkg::bursts_of(prd.count, BURST_B);
          prd_loaded  <= 1'b1;
          prd_ptr     <= prd_ptr + 32'd8;
          need_prd    <= 1'b0;
          k           <= '0;
          state       <= (dir_q == ssd_pkg::DMA_READ) ? S_MEMW : S_MEMR_REQ;
        end
        S_MEMW: if (mem_gnt) begin
          k <= k + 1'b1;
          if (k == (BLW+1)'(BL - 1)) state <= S_NEXT;
        end
        S_MEMR_REQ: if (mem_gnt) state <= S_MEMR_WAIT;
        S_MEMR_WAIT: if (mem_rvalid) begin
          buf_q[k[BLW-1:0]] <= mem_rdata;
          k                 <= k + 1'b1;
          state             <= (k == (BLW+1)'(BL - 1)) ? S_ACT : S_MEMR_REQ;
        end
        S_NEXT: begin
          // one burst finished on both sides
          ssd_a       <= ssd_a + 32'(BURST_B);
          mem_a       <= mem_a + 32'(BURST_B);
          bursts_left <= bursts_left - 1'b1;
          k           <= '0;
          if (bursts_left == 32'd1) begin
            if (eot_q) begin
              state <= S_DONE;
            end else begin
              need_prd <= 1'b1;
              state    <= (dir_q == ssd_pkg::DMA_READ) ? S_RWAIT : S_PRD_REQ;
            end
          end else begin
            state <= (dir_q == ssd_pkg::DMA_READ) ? S_RWAIT : S_MEMR_REQ;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DDR command, memory port and sub-operation outputs
  always_comb begin
    ddr_cmd   = ssd_pkg::DDR_NOP;
    ddr_addr  = '0;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    op        = ssd_pkg::OP_IDLE;
    // read commands come from the issue side, write commands from the
    // main state machine; the two never run in the same transfer
    unique case (iss_st)
      I_ACT: if (!row_open || open_row != iss_row) begin
        ddr_cmd  = ssd_pkg::DDR_ACT;
        ddr_addr = ADDR_W'(iss_row);
      end
      I_RD: begin
        ddr_cmd  = ssd_pkg::DDR_RD;
        ddr_addr = ADDR_W'(iss_col);
      end
      default: ;
    endcase
    unique case (state)
      S_CMD: op = ssd_pkg::OP_A_CMD;
      S_ACT: begin
        if (!row_open || open_row != cur_row) begin
          ddr_cmd  = ssd_pkg::DDR_ACT;
          ddr_addr = ADDR_W'(cur_row);
        end
        op = ssd_pkg::OP_D_IF;
      end
      S_RW: begin
        ddr_cmd  = ssd_pkg::DDR_WR;
        ddr_addr = ADDR_W'(cur_col);
        op       = ssd_pkg::OP_D_IF;
      end
      S_RWAIT: op = (seen_dqs || dqs_in_oe || cap_full) ? ssd_pkg::OP_D_IF : ssd_pkg::OP_C_SSD;
      S_WDRV:  op = ssd_pkg::OP_D_IF;
      S_IRQ:   op = ssd_pkg::OP_C_SSD;
      S_PRD_REQ: begin
        mem_req  = 1'b1;
        mem_addr = prd_ptr;
        op       = ssd_pkg::OP_B_PRD;
      end
      S_PRD_WAIT: op = ssd_pkg::OP_B_PRD;
      S_MEMW: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = mem_a + 32'(k) * 32'(BEAT_B);
        mem_wdata = buf_q[k[BLW-1:0]];
        op        = ssd_pkg::OP_E_MEM;
      end
      S_MEMR_REQ: begin
        mem_req  = 1'b1;
        mem_addr = mem_a + 32'(k) * 32'(BEAT_B);
        op       = ssd_pkg::OP_E_MEM;
      end
      S_MEMR_WAIT: op = ssd_pkg::OP_E_MEM;
      default: ;
    endcase
  end

  assign cmd_ready = (state == S_IDLE);

  // The write burst driver is idle whenever a new WR is issued.
  a_drv_idle: assert property (@(posedge clk) disable iff (!rst_n)
    drv_start |-> !drv_busy);

  // A new read burst never arrives while the last one is still unread.
  a_cap_free: assert property (@(posedge clk) disable iff (!rst_n)
    cap_valid |-> !cap_full);

endmodule
