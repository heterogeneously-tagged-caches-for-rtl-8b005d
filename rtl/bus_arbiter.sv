// Memory bus arbiter.
//
// The cache and the write buffer share one memory bus. A line refill
// (read) has priority because the processor waits for it; the write
// buffer's head entry is written only while no refill is requested or
// awaiting its data, i.e. when the bus is not busy serving processor reads.
//
// Bus protocol (this design's own): a request is held on mem_req with its
// address and, for writes, line data and byte mask until mem_ready is high
// in the same cycle. A write is complete when accepted. A read is answered
// later by one cycle of mem_rvalid with the whole line; only one read is
// outstanding at a time.
module bus_arbiter
  import htag_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned LINE_W    = LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // refill from the controller
  input  logic                  rd_req,
  input  pa_t                   rd_addr,
  output logic                  rd_gnt,
  output logic                  rd_done,
  output logic [LINE_W-1:0]     rd_data,
  // write-buffer head
  input  logic                  wr_valid,
  input  pa_t                   wr_addr,
  input  logic [LINE_W-1:0]     wr_data,
  input  logic [LINE_BYTES-1:0] wr_bmask,
  output logic                  wr_pop,
  // memory bus
  output logic                  mem_req,
  output logic                  mem_we,
  output pa_t                   mem_addr,
  output logic [LINE_W-1:0]     mem_wdata,
  output logic [LINE_BYTES-1:0] mem_wmask,
  input  logic                  mem_ready,
  input  logic                  mem_rvalid,
  input  logic [LINE_W-1:0]     mem_rdata
);

  logic rd_pending_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     rd_pending_q <= 1'b0;
    else if (mem_rvalid)            rd_pending_q <= 1'b0;
    else if (rd_gnt)                rd_pending_q <= 1'b1;
  end

  logic sel_rd, sel_wr;
  assign sel_rd = rd_req && !rd_pending_q;
  assign sel_wr = !rd_req && !rd_pending_q && wr_valid;

  assign mem_req   = sel_rd || sel_wr;
  assign mem_we    = sel_wr;
  assign mem_addr  = sel_rd ? rd_addr : wr_addr;
  assign mem_wdata = wr_data;
  assign mem_wmask = sel_wr ? wr_bmask : '0;

  assign rd_gnt  = sel_rd && mem_ready;
  assign wr_pop  = sel_wr && mem_ready;
  assign rd_done = mem_rvalid && rd_pending_q;
  assign rd_data = mem_rdata;

  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> rd_pending_q);

endmodule
