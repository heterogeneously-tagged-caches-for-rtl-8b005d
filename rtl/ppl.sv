// Physical page latch (PPL) for write-through stores.
//
// A write-through cache must send every store to memory with a physical
// address. The PPL keeps the translation of the most recent store: a
// register with the page's VPN, used as a tag, and a latch with its PPN.
// A store whose VPN matches needs no TLB lookup, so a run of stores to one
// page costs one lookup. The stored PID alongside the VPN, and clearing the
// latch whenever the TLB is rewritten, are this design's own additions that
// keep the latch correct across processes and remappings.
//
// Lookup is combinational; update and invalidate take effect at the next
// clock edge. Invalidate wins over update.
module ppl
  import htag_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pid_t lk_pid,
  input  vpn_t lk_vpn,
  output logic hit,
  output ppn_t ppn,
  input  logic upd,
  input  pid_t upd_pid,
  input  vpn_t upd_vpn,
  input  ppn_t upd_ppn,
  input  logic inv
);

  logic valid_q;
  pid_t pid_q;
  vpn_t vpn_q;
  ppn_t ppn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      pid_q   <= '0;
      vpn_q   <= '0;
      ppn_q   <= '0;
    end else if (inv) begin
      valid_q <= 1'b0;
    end else if (upd) begin
      valid_q <= 1'b1;
      pid_q   <= upd_pid;
      vpn_q   <= upd_vpn;
      ppn_q   <= upd_ppn;
    end
  end

  assign hit = valid_q && (vpn_q == lk_vpn) && (pid_q == lk_pid);
  assign ppn = ppn_q;

endmodule
