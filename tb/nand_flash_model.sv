// nand_flash_model: behavioural model of one NAND flash device on one
// channel of nand_flash_if (not synthesizable; testbench use only).
//
// Understands READ (00h, 5 address bytes, 30h) and PROGRAM (80h, 5 address
// bytes, data, 10h) on the synchronous bus of ssd_pkg::nand_out_t. After
// 30h it is busy (rb = 0) for T_R cycles and then serves the page from its
// page register, one byte per `re`, one cycle later on io_i. After 10h it
// is busy for T_PROG cycles and then the page is stored. Pages never
// written hold ssd_tb_pkg::flash_byte of the SSD page number, which is
// row * CHANNELS + CH. `reads` and `progs` count page operations.
module nand_flash_model
  import ssd_pkg::nand_out_t, ssd_pkg::nand_in_t;
#(
  parameter int unsigned PAGE_BYTES = 2048,
  parameter int unsigned CHANNELS   = 4,
  parameter int unsigned CH         = 0,
  parameter int unsigned T_R        = 25,
  parameter int unsigned T_PROG     = 200
) (
  input  logic      clk,
  input  nand_out_t nout,
  output nand_in_t  nin
);

  logic [7:0]  store [longint];        // written bytes, by row * PAGE_BYTES + col
  logic [7:0]  pbuf  [PAGE_BYTES];
  logic [7:0]  cmd_q;
  int unsigned acnt, ptr, busy, row;
  logic        commit;
  int unsigned reads = 0, progs = 0;

  function automatic logic [7:0] cell_at(input int unsigned r, input int unsigned c);
    longint key = longint'(r) * PAGE_BYTES + c;
    if (store.exists(key)) return store[key];
    return ssd_tb_pkg::flash_byte(r * CHANNELS + CH, c);
  endfunction

  initial begin
    nin.rb   = 1'b1;
    nin.io_i = '0;
    busy   = 0;
    acnt   = 0;
    ptr    = 0;
    row    = 0;
    cmd_q  = '0;
    commit = 1'b0;
  end

  always @(posedge clk) begin
    if (busy > 0) begin
      busy = busy - 1;
      if (busy == 0) begin
        if (commit) begin
          for (int c = 0; c < PAGE_BYTES; c++) store[longint'(row) * PAGE_BYTES + c] = pbuf[c];
          progs++;
        end else begin
          for (int c = 0; c < PAGE_BYTES; c++) pbuf[c] = cell_at(row, c);
          reads++;
        end
        nin.rb <= 1'b1;
      end
    end
    if (nout.we && nout.cle) begin
      unique case (nout.io_o)
        8'h00, 8'h80: begin
          cmd_q = nout.io_o;
          acnt  = 0;
          row   = 0;
          if (nout.io_o == 8'h80) for (int c = 0; c < PAGE_BYTES; c++) pbuf[c] = 8'hff;
        end
        8'h30: begin busy = T_R;    commit = 1'b0; ptr = 0; nin.rb <= 1'b0; end
        8'h10: begin busy = T_PROG; commit = 1'b1;          nin.rb <= 1'b0; end
        default: ;
      endcase
    end else if (nout.we && nout.ale) begin
      if (acnt >= 2) row = row | (int'(nout.io_o) << (8 * (acnt - 2)));
      acnt++;
      ptr = 0;
    end else if (nout.we) begin
      pbuf[ptr] = nout.io_o;
      ptr++;
    end
    if (nout.re) begin
      nin.io_i <= pbuf[ptr];
      ptr++;
    end
  end

endmodule
