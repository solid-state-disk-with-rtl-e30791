// main_memory_model: behavioural model of the PC's main memory as seen by
// the DMA's memory port (testbench use only).
//
// A request is held until gnt, which comes after 0 to MAX_WAIT cycles.
// A granted read returns its word with rvalid LAT cycles later. Words are
// kept by byte address in `mem`; unwritten words read as zero.
module main_memory_model #(
  parameter int unsigned DQ_W     = 64,
  parameter int unsigned MAX_WAIT = 2,
  parameter int unsigned LAT      = 3
) (
  input  logic            clk,
  input  logic            req,
  input  logic            we,
  input  logic [31:0]     addr,
  input  logic [DQ_W-1:0] wdata,
  output logic            gnt,
  output logic            rvalid,
  output logic [DQ_W-1:0] rdata
);

  logic [DQ_W-1:0] mem [longint];
  int unsigned     wait_cnt = 0;
  logic [LAT:0]    v_pipe   = '0;
  logic [DQ_W-1:0] d_pipe [LAT+1];
  int unsigned     writes = 0, reads = 0;

  always_comb gnt = req && (wait_cnt == 0);

  always @(posedge clk) begin
    if (req && wait_cnt == 0) begin
      if (we) begin
        mem[longint'(addr)] = wdata;
        writes++;
      end else begin
        reads++;
      end
      wait_cnt <= $urandom_range(MAX_WAIT, 0);
    end else if (wait_cnt > 0) begin
      wait_cnt <= wait_cnt - 1;
    end
    v_pipe    <= {v_pipe[LAT-1:0], req && (wait_cnt == 0) && !we};
    d_pipe[0] <= mem.exists(longint'(addr)) ? mem[longint'(addr)] : '0;
    for (int s = 1; s <= LAT; s++) d_pipe[s] <= d_pipe[s-1];
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];

endmodule
