// Fully associative data TLB.
//
// Translates a (PID, VPN) pair to a PPN and the page's access-control bits.
// All entries are compared in parallel and the result is available in the
// same cycle as the lookup. There is no hardware page-table walk: on a miss
// the requester reports the miss and the OS writes an entry through the
// synchronous write port, at a slot of its choosing. Tagging entries with
// the PID is this design's choice; reset invalidates every entry. The
// cache uses the TLB only for private misses, evictions of virtually
// tagged lines, references to the TLB-translated shared half and
// write-through stores that miss the physical page latch.
module dtlb
  import htag_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup
  input  pid_t                        lk_pid,
  input  vpn_t                        lk_vpn,
  output logic                        lk_hit,
  output ppn_t                        lk_ppn,
  output ac_t                         lk_ac,
  // OS write port
  input  logic                        we,
  input  logic [$clog2(ENTRIES)-1:0]  wr_idx,
  input  tlb_entry_t                  wr_entry
);

  tlb_entry_t tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) tab[i] <= '0;
    end else if (we) begin
      tab[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    lk_ac  = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (tab[i].valid && tab[i].pid == lk_pid && tab[i].vpn == lk_vpn) begin
        lk_hit = 1'b1;
        lk_ppn = lk_ppn | tab[i].ppn;
        lk_ac  = lk_ac  | tab[i].ac;
      end
    end
  end

endmodule
