// Synonym offset table (SOT).
//
// One row per shared buffer that is translated by adders instead of the
// TLB. A row holds the access-control bits of the whole buffer, the VPN
// offset (PPN - VPN for every page of the buffer) and the superset offset
// (physical minus virtual superset bits). The table is read directly by the
// SOT index taken from the top virtual address bits, combinationally, so
// its outputs are ready in the cycle of the access. The OS programs it
// through a synchronous write port. The table is built from registers, one
// of the two implementations the method allows; the valid bit of each row
// is this design's own addition and reset clears all rows.
module sot
  import htag_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned SS_W    = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // read port
  input  logic [$clog2(ENTRIES)-1:0]  rd_idx,
  output logic                        rd_valid,
  output ac_t                         rd_ac,
  output vpn_t                        rd_vpn_off,
  output logic [SS_W-1:0]             rd_ss_off,
  // OS write port
  input  logic                        we,
  input  logic [$clog2(ENTRIES)-1:0]  wr_idx,
  input  logic                        wr_valid,
  input  ac_t                         wr_ac,
  input  vpn_t                        wr_vpn_off,
  input  logic [SS_W-1:0]             wr_ss_off
);

  typedef struct packed {
    logic            valid;
    ac_t             ac;
    vpn_t            vpn_off;
    logic [SS_W-1:0] ss_off;
  } sot_row_t;

  sot_row_t rows [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) rows[i] <= '0;
    end else if (we) begin
      rows[wr_idx] <= '{valid: wr_valid, ac: wr_ac, vpn_off: wr_vpn_off, ss_off: wr_ss_off};
    end
  end

  assign rd_valid   = rows[rd_idx].valid;
  assign rd_ac      = rows[rd_idx].ac;
  assign rd_vpn_off = rows[rd_idx].vpn_off;
  assign rd_ss_off  = rows[rd_idx].ss_off;

endmodule
