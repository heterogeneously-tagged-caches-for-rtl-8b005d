// Write buffer with virtual-address entries.
//
// A FIFO of pending memory writes. An entry is one cache line wide, with
// a byte mask, and carries the line address, the PID and a V bit. A dirty
// virtually tagged line evicted from the cache enters immediately with its
// virtual address (V = 1); the buffer then asks for a TLB translation of
// its oldest virtual entry (xl_req). When the shared TLB is free the
// arbiter grants it (xl_gnt) and, on a hit, the entry's address is replaced
// by the physical one in that cycle. Only a physical entry at the head may
// drain to memory (head_valid/pop), so writes leave in order. A grant that
// misses in the TLB leaves the entry virtual and raises xl_miss for the OS.
// On a cache miss the controller checks the buffer for the missing line:
// virtual entries are compared by PID and virtual line address, physical
// entries by physical line address (chk_match, combinational).
// Push and pop take effect at the clock edge; a push into a full buffer is
// ignored (the controller waits on full). DEPTH is a power of two; the
// default of 4 is the typical size given for such buffers. Line-wide
// entries, so that evictions and single write-through stores share the
// buffer, are this design's choice.
module write_buffer
  import htag_pkg::*;
#(
  parameter int unsigned DEPTH      = 4,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned LINE_W    = LINE_BYTES * 8,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // enqueue
  input  logic                  push,
  input  logic [VA_W-1:0]       push_addr,
  input  logic                  push_virt,
  input  pid_t                  push_pid,
  input  logic [LINE_W-1:0]     push_data,
  input  logic [LINE_BYTES-1:0] push_bmask,
  output logic                  full,
  output logic                  empty,
  // oldest entry, once physical
  output logic                  head_valid,
  output pa_t                   head_addr,
  output logic [LINE_W-1:0]     head_data,
  output logic [LINE_BYTES-1:0] head_bmask,
  input  logic                  pop,
  // translation of the oldest virtual entry
  output logic                  xl_req,
  output pid_t                  xl_pid,
  output vpn_t                  xl_vpn,
  input  logic                  xl_gnt,
  input  logic                  xl_hit,
  input  ppn_t                  xl_ppn,
  output logic                  xl_miss,
  // lookup of a missing line
  input  pa_t                   chk_pa,
  input  va_t                   chk_va,
  input  pid_t                  chk_pid,
  output logic                  chk_match
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic                  virt;
    pid_t                  pid;
    logic [VA_W-1:0]       addr;
    logic [LINE_BYTES-1:0] bmask;
    logic [LINE_W-1:0]     data;
  } wb_entry_t;

  wb_entry_t          ent [DEPTH];
  logic [PTR_W-1:0]   head_q, tail_q;
  logic [PTR_W:0]     count_q;

  logic               do_push, do_pop;
  logic [PTR_W-1:0]   xl_slot;
  logic               xl_found;

  assign full  = (count_q == (PTR_W+1)'(DEPTH));
  assign empty = (count_q == '0);

  assign do_push = push && !full;
  assign do_pop  = pop && head_valid;

  assign head_valid = !empty && !ent[head_q].virt;
  assign head_addr  = ent[head_q].addr;
  assign head_data  = ent[head_q].data;
  assign head_bmask = ent[head_q].bmask;

  // oldest virtual entry
  always_comb begin
    xl_found = 1'b0;
    xl_slot  = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      automatic logic [PTR_W-1:0] s = head_q + PTR_W'(i);
      if (!xl_found && (PTR_W+1)'(i) < count_q && ent[s].virt) begin
        xl_found = 1'b1;
        xl_slot  = s;
      end
    end
  end
  assign xl_req  = xl_found;
  assign xl_pid  = ent[xl_slot].pid;
  assign xl_vpn  = ent[xl_slot].addr[VA_W-1 -: VPN_W];
  assign xl_miss = xl_found && xl_gnt && !xl_hit;

  // lookup with a virtual or a physical tag, as in the cache
  always_comb begin
    chk_match = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      automatic logic [PTR_W-1:0] s = head_q + PTR_W'(i);
      if ((PTR_W+1)'(i) < count_q) begin
        if (ent[s].virt) begin
          if (ent[s].pid == chk_pid && ent[s].addr[VA_W-1:OFF_W] == chk_va[VA_W-1:OFF_W])
            chk_match = 1'b1;
        end else if (ent[s].addr[PA_W-1:OFF_W] == chk_pa[PA_W-1:OFF_W]) begin
          chk_match = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) ent[i] <= '0;
    end else begin
      if (xl_found && xl_gnt && xl_hit) begin
        ent[xl_slot].addr <= {xl_ppn, ent[xl_slot].addr[PAGE_BITS-1:0]};
        ent[xl_slot].virt <= 1'b0;
      end
      if (do_push) begin
        ent[tail_q] <= '{virt: push_virt, pid: push_pid, addr: push_addr,
                         bmask: push_bmask, data: push_data};
        tail_q <= tail_q + 1'b1;
      end
      if (do_pop) head_q <= head_q + 1'b1;
      count_q <= count_q + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
    end
  end

  initial assert ((DEPTH & (DEPTH - 1)) == 0) else $error("DEPTH must be a power of two");
  // a push must never be presented to a full buffer
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
