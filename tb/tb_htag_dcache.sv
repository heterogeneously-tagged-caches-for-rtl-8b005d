// End-to-end test of the heterogeneously tagged data cache at its default
// parameters: 32 KB direct-mapped, 32-entry TLB, write-back.
// The test program (tb_htag_env) acts as processor and OS, models memory,
// predicts every load from a reference memory and requires every
// mechanism of the design to occur at least once. This wrapper prints the
// result when the program raises done, or after a 400000-cycle watchdog.
module tb_htag_dcache;
  import htag_pkg::*;
  logic clk, rst_n;
  pid_t pid;
  logic req_valid, req_ready, req_we;
  va_t req_addr;
  logic [31:0] req_wdata, resp_rdata;
  logic [3:0] req_be;
  logic resp_valid;
  resp_e resp_status;
  logic tlb_we;
  logic [4:0] tlb_wr_idx;
  tlb_entry_t tlb_wr_entry;
  logic sot_we, sot_wr_valid;
  logic [2:0] sot_wr_idx, sot_wr_ss_off;
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
  logic done;
  int checks, failures;

  htag_dcache dut (.*);
  tb_htag_env #(.WT(1'b0)) env (.*);

  // report once the program is done; the watchdog bounds the run
  initial begin
    int n;
    n = 0;
    @(posedge clk);  // done is cleared by the program at time 0
    while (!done && n < 400000) begin @(posedge clk); n++; end
    if (!done) $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + int'(!done));
    $finish;
  end
endmodule
