// One cache configuration under the benchmark-mix program (test use only).
//
// Instantiates htag_dcache with the given size, associativity, TLB size
// and write policy (write-through with or without the physical page
// latch), and tb_htag_wl_prog as its processor, OS and memory; SHARED_TLB
// moves the shared buffers from the SOT to the TLB half of the address map.
// It exists so that a testbench can run several configurations side by
// side. done, checks and failures come from the program.
module tb_htag_wl_unit
  import htag_pkg::*;
#(
  parameter int    CACHE_BYTES   = 32768,
  parameter int    WAYS          = 1,
  parameter int    TLB_ENTRIES   = 32,
  parameter bit    WRITE_THROUGH = 1'b0,
  parameter bit    USE_PPL       = 1'b1,
  parameter bit    SHARED_TLB    = 1'b0,
  parameter int    N_PER_BENCH   = 5000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int TLB_IW = $clog2(TLB_ENTRIES);
  localparam int SS_W   = $clog2(CACHE_BYTES / WAYS) - 12;
  localparam int SSW    = (SS_W > 0) ? SS_W : 1;

  logic clk, rst_n;
  pid_t pid;
  logic req_valid, req_ready, req_we;
  va_t req_addr;
  logic [31:0] req_wdata, resp_rdata;
  logic [3:0] req_be;
  logic resp_valid;
  resp_e resp_status;
  logic tlb_we;
  logic [TLB_IW-1:0] tlb_wr_idx;
  tlb_entry_t tlb_wr_entry;
  logic sot_we, sot_wr_valid;
  logic [2:0] sot_wr_idx;
  logic [SSW-1:0] sot_wr_ss_off;
  ac_t sot_wr_ac;
  vpn_t sot_wr_vpn_off;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  pa_t mem_addr;
  logic [255:0] mem_wdata, mem_rdata;
  logic [31:0] mem_wmask;
  logic busy_init, wb_empty, wb_tlb_miss;
  pid_t wb_miss_pid;
  vpn_t wb_miss_vpn;
  logic ev_tlb_lookup, ev_sot_xlate, ev_ppl_hit, ev_wb_xlate, ev_hit, ev_miss, ev_evict, ev_wb_wait;

  htag_dcache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .TLB_ENTRIES(TLB_ENTRIES),
                .WRITE_THROUGH(WRITE_THROUGH), .USE_PPL(USE_PPL)) dut (.*);
  tb_htag_wl_prog #(.WT(WRITE_THROUGH), .USE_PPL(USE_PPL), .SHARED_TLB(SHARED_TLB),
                    .TLB_IW(TLB_IW), .SSW(SSW),
                    .N_PER_BENCH(N_PER_BENCH), .CACHE_KB(CACHE_BYTES / 1024),
                    .WAYS(WAYS), .TLB_ENTRIES(TLB_ENTRIES)) prog (.*);
endmodule
