// Behavioural model of the physical memory behind the cache (test use
// only). Line-wide bus as described in bus_arbiter: a request is accepted
// when mem_req and mem_ready are both high; a read is answered after
// LATENCY to LATENCY+3 cycles by one cycle of mem_rvalid. mem_ready drops
// at random, and the stall input holds it low for writes (reads still go).
// Memory not yet written reads as init_word(address), so the testbench can
// predict it.
module tb_mem_model #(
  parameter int LATENCY = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         stall,
  input  logic         mem_req,
  input  logic         mem_we,
  input  logic [31:0]  mem_addr,
  input  logic [255:0] mem_wdata,
  input  logic [31:0]  mem_wmask,
  output logic         mem_ready,
  output logic         mem_rvalid,
  output logic [255:0] mem_rdata
);

  logic [255:0] lines [logic [26:0]];
  int           rd_count;
  logic [26:0]  rd_line;
  logic         rd_busy;
  int unsigned  n_writes = 0;
  logic         ready_q;

  assign mem_ready = ready_q && !(stall && mem_we);

  function automatic logic [31:0] init_word(input logic [31:0] pa);
    return {pa[31:2], 2'b00} ^ 32'h5EED_1234;
  endfunction

  function automatic logic [255:0] get_line(input logic [26:0] l);
    logic [255:0] d;
    if (lines.exists(l)) return lines[l];
    for (int w = 0; w < 8; w++) d[w*32 +: 32] = init_word({l, 5'(w * 4)});
    return d;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] pa);
    logic [255:0] d;
    d = get_line(pa[31:5]);
    return d[pa[4:2]*32 +: 32];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_q    <= 1'b0;
      mem_rvalid <= 1'b0;
      mem_rdata  <= '0;
      rd_busy    <= 1'b0;
      rd_count   <= 0;
      rd_line    <= '0;
    end else begin
      mem_rvalid <= 1'b0;
      ready_q    <= ($urandom_range(0, 3) != 0);
      if (mem_req && mem_ready) begin
        if (mem_we) begin
          logic [255:0] d;
          d = get_line(mem_addr[31:5]);
          for (int b = 0; b < 32; b++) if (mem_wmask[b]) d[b*8 +: 8] = mem_wdata[b*8 +: 8];
          lines[mem_addr[31:5]] = d;
          n_writes++;
        end else begin
          rd_busy  <= 1'b1;
          rd_line  <= mem_addr[31:5];
          rd_count <= LATENCY + int'($urandom_range(0, 3));
        end
      end
      if (rd_busy) begin
        if (rd_count <= 1) begin
          rd_busy    <= 1'b0;
          mem_rvalid <= 1'b1;
          mem_rdata  <= get_line(rd_line);
        end else begin
          rd_count <= rd_count - 1;
        end
      end
    end
  end

endmodule
