// Benchmark-mix program for one htag_dcache instance (test use only).
//
// It acts as one application process and the OS around it, and replays a
// synthetic access stream for each of seven media benchmarks. The streams
// are shaped by four numbers per benchmark, in thousands of accesses:
// total accesses, accesses to shared buffers, writes, and writes to
// private data. Each benchmark runs N_PER_BENCH accesses, drawn at random
// in those proportions:
//   - shared reads walk an input buffer of four pages, word by word
//   - shared writes walk an output buffer of four pages, word by word
//   - with SHARED_TLB = 0 both buffers sit in the SOT half of the shared
//     area, so the adders translate them, and their virtual superset bits
//     differ from the physical ones
//   - with SHARED_TLB = 1 they sit in the TLB half instead, on physical
//     pages the OS has coloured to match, and the TLB translates them (the
//     heterogeneous tags alone, without the adders)
//   - private accesses go 70 % to a 2-page stack and 30 % to a 4-page
//     state area, at random word addresses
// The access counts are from the evaluation. The buffer sizes, the locality
// split and the scaling are this bench's own choice.
//
// The OS fills the TLB round-robin on every RESP_TLB_MISS (then retries)
// and on every untranslatable write-buffer entry. A reference memory
// checks every load.
//
// It reports, for each benchmark, how many cycles the TLB was looked up,
// against the physically tagged baseline of one lookup per access. It
// checks that:
//   - SOT mode: every shared access was translated by the adders, exactly
//     once, and no shared access caused a TLB lookup (total lookups stay at
//     or below the number of private accesses)
//   - TLB mode: no access used the adders, and lookups stay between the
//     number of shared accesses and the number of all accesses
//   - every access completed with the expected status
// Ports mirror those of htag_dcache. done rises after the last benchmark,
// and checks/failures hold the totals.
module tb_htag_wl_prog
  import htag_pkg::*;
#(
  parameter bit    WT          = 1'b0,
  parameter bit    USE_PPL     = 1'b1,
  parameter int    TLB_IW      = 5,
  parameter int    SSW         = 3,
  parameter int    N_PER_BENCH = 2000,
  parameter bit    SHARED_TLB  = 1'b0,
  parameter int    CACHE_KB    = 32,   // for the report only
  parameter int    WAYS        = 1,    // for the report only
  parameter int    TLB_ENTRIES = 32    // for the report only
) (
  output logic                  clk,
  output logic                  rst_n,
  output pid_t                  pid,
  output logic                  req_valid,
  input  logic                  req_ready,
  output logic                  req_we,
  output va_t                   req_addr,
  output logic [31:0]           req_wdata,
  output logic [3:0]            req_be,
  input  logic                  resp_valid,
  input  resp_e                 resp_status,
  input  logic [31:0]           resp_rdata,
  output logic                  tlb_we,
  output logic [TLB_IW-1:0]     tlb_wr_idx,
  output tlb_entry_t            tlb_wr_entry,
  output logic                  sot_we,
  output logic [2:0]            sot_wr_idx,
  output logic                  sot_wr_valid,
  output ac_t                   sot_wr_ac,
  output vpn_t                  sot_wr_vpn_off,
  output logic [SSW-1:0]        sot_wr_ss_off,
  input  logic                  mem_req,
  input  logic                  mem_we,
  input  pa_t                   mem_addr,
  input  logic [255:0]          mem_wdata,
  input  logic [31:0]           mem_wmask,
  output logic                  mem_ready,
  output logic                  mem_rvalid,
  output logic [255:0]          mem_rdata,
  input  logic                  busy_init,
  input  logic                  wb_empty,
  input  logic                  wb_tlb_miss,
  input  pid_t                  wb_miss_pid,
  input  vpn_t                  wb_miss_vpn,
  input  logic                  ev_tlb_lookup,
  input  logic                  ev_sot_xlate,
  input  logic                  ev_ppl_hit,
  input  logic                  ev_wb_xlate,
  input  logic                  ev_hit,
  input  logic                  ev_miss,
  input  logic                  ev_evict,
  input  logic                  ev_wb_wait,
  output logic                  done,
  output int                    checks,
  output int                    failures
);

  string NAME, POL, SHR_MODE;
  initial begin
    POL      = !WT ? "WB" : (USE_PPL ? "WT+PPL" : "WT");
    SHR_MODE = SHARED_TLB ? "shTLB" : "shSOT";
    NAME     = $sformatf("%0dK-%0dW-T%0d-%s-%s", CACHE_KB, WAYS, TLB_ENTRIES, POL, SHR_MODE);
  end

  logic stall;
  assign stall = 1'b0;

  initial clk = 0;
  always #5 clk = ~clk;

  tb_mem_model #(.LATENCY(4)) mem (.*);

  // ---------------- benchmark table (thousands of accesses) ----------------
  localparam int NB = 7;
  localparam string BN   [NB] = '{"adpcm", "g721", "gsm", "epic", "jpeg", "mpeg", "mp3"};
  localparam int    ACC  [NB] = '{891, 48272, 52199, 7621, 5885, 341549, 317333};
  localparam int    SHR  [NB] = '{590, 295, 251, 2018, 134, 93306, 4335};
  localparam int    WRS  [NB] = '{373, 11640, 11784, 841, 1620, 22924, 82971};
  localparam int    PWR  [NB] = '{4, 11640, 11683, 547, 1588, 21867, 80960};

  localparam pid_t APP = 4'd1;
  // input and output buffer, four pages each: SOT rows 0 and 1, or pages in
  // the TLB half whose physical pages share their low three VPN bits
  localparam vpn_t IN_VPN  = SHARED_TLB ? 20'hC0003 : 20'hE0003;
  localparam vpn_t OUT_VPN = SHARED_TLB ? 20'hC4005 : 20'hE4005;
  localparam ppn_t IN_PPN  = SHARED_TLB ? 20'h02003 : 20'h02006;
  localparam ppn_t OUT_PPN = SHARED_TLB ? 20'h0200D : 20'h0200A;
  localparam vpn_t STACK_VPN = 20'h00100, STATE_VPN = 20'h00014;

  // ---------------- event counters ----------------
  int n_tlb = 0, n_sot = 0, n_ppl = 0, n_miss = 0, n_hit = 0, n_evict = 0;
  always @(posedge clk) if (rst_n) begin
    n_tlb   += int'(ev_tlb_lookup);
    n_sot   += int'(ev_sot_xlate);
    n_ppl   += int'(ev_ppl_hit);
    n_miss  += int'(ev_miss);
    n_hit   += int'(ev_hit);
    n_evict += int'(ev_evict);
  end

  task automatic ck(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s FAIL %s", NAME, msg);
    end
  endtask

  // ---------------- OS: translation ----------------
  function automatic pa_t xlate(input va_t va);
    vpn_t v;
    v = va[31:12];
    if (v >= IN_VPN && v < IN_VPN + 4)   return {vpn_t'(v - IN_VPN + IN_PPN), va[11:0]};
    if (v >= OUT_VPN && v < OUT_VPN + 4) return {vpn_t'(v - OUT_VPN + OUT_PPN), va[11:0]};
    return {vpn_t'(20'h01000 + v), va[11:0]};
  endfunction

  int tlb_rr = 0;
  task automatic os_tick();
    tlb_we = 1'b0;
    if (wb_tlb_miss) begin
      tlb_we       = 1'b1;
      tlb_wr_idx   = TLB_IW'(tlb_rr); tlb_rr++;
      tlb_wr_entry = '{valid: 1'b1, pid: wb_miss_pid, vpn: wb_miss_vpn,
                       ppn: ppn_t'(xlate({wb_miss_vpn, 12'h0}) >> 12), ac: 2'b11};
    end
  endtask

  task automatic os_fill(input va_t va);
    @(negedge clk);
    tlb_we       = 1'b1;
    tlb_wr_idx   = TLB_IW'(tlb_rr); tlb_rr++;
    tlb_wr_entry = '{valid: 1'b1, pid: APP, vpn: va[31:12], ppn: ppn_t'(xlate(va) >> 12), ac: 2'b11};
    @(negedge clk);
    tlb_we = 1'b0;
  endtask

  // ---------------- reference memory ----------------
  logic [31:0] ref_mem [logic [29:0]];
  function automatic logic [31:0] ref_read(input pa_t pa);
    return ref_mem.exists(pa[31:2]) ? ref_mem[pa[31:2]] : ({pa[31:2], 2'b00} ^ 32'h5EED_1234);
  endfunction

  task automatic access(input va_t va, input logic we, input logic [31:0] wd);
    resp_e st;
    logic [31:0] rd;
    pa_t pa;
    int waited, tries;
    pa = xlate(va);
    tries = 0;
    forever begin
      @(negedge clk);
      os_tick();
      pid = APP; req_valid = 1'b1; req_we = we; req_addr = va; req_wdata = wd; req_be = 4'hF;
      while (!req_ready) begin @(negedge clk); os_tick(); end
      @(negedge clk);
      os_tick();
      req_valid = 1'b0;
      waited = 0;
      while (!resp_valid) begin
        @(negedge clk); os_tick(); waited++;
        if (waited > 2000) begin ck(1'b0, "no response"); return; end
      end
      st = resp_status; rd = resp_rdata;
      if (st == RESP_TLB_MISS && tries < 3) begin
        tries++;
        os_fill(va);
        continue;
      end
      break;
    end
    ck(st == RESP_OK, $sformatf("status va=%h we=%0d got %0d", va, we, st));
    if (we) ref_mem[pa[31:2]] = wd;
    else ck(rd == ref_read(pa), $sformatf("load va=%h got %h exp %h", va, rd, ref_read(pa)));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    rst_n = 0; pid = APP; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    tlb_we = 0; tlb_wr_idx = 0; tlb_wr_entry = '0;
    sot_we = 0; sot_wr_idx = 0; sot_wr_valid = 0; sot_wr_ac = 0; sot_wr_vpn_off = 0; sot_wr_ss_off = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // OS programs the two SOT rows: VPN offset and its low bits as superset offset
    @(negedge clk);
    sot_we = 1; sot_wr_idx = 3'd0; sot_wr_valid = 1; sot_wr_ac = 2'b11;
    sot_wr_vpn_off = vpn_t'(IN_PPN - IN_VPN); sot_wr_ss_off = SSW'(IN_PPN - IN_VPN);
    @(negedge clk);
    sot_wr_idx = 3'd1;
    sot_wr_vpn_off = vpn_t'(OUT_PPN - OUT_VPN); sot_wr_ss_off = SSW'(OUT_PPN - OUT_VPN);
    @(negedge clk);
    sot_we = 0;
    while (busy_init) @(negedge clk);

    for (int b = 0; b < NB; b++) begin
      int tlb0, sot0, ppl0, miss0;
      int n_sh, n_pw, n_priv, n_wr;
      int in_ptr, out_ptr;
      tlb0 = n_tlb; sot0 = n_sot; ppl0 = n_ppl; miss0 = n_miss;
      n_sh = 0; n_pw = 0; n_priv = 0; n_wr = 0;
      in_ptr = 0; out_ptr = 0;
      for (int i = 0; i < N_PER_BENCH; i++) begin
        int r;
        va_t va;
        // pick the kind of access in the benchmark's proportions
        r = $urandom_range(0, ACC[b] - 1);
        if (r < WRS[b] - PWR[b]) begin
          va = {OUT_VPN, 12'h0} + 32'(out_ptr);
          out_ptr = (out_ptr + 4) % 16384;
          access(va, 1'b1, $urandom());
          n_sh++; n_wr++;
        end else if (r < SHR[b]) begin
          va = {IN_VPN, 12'h0} + 32'(in_ptr);
          in_ptr = (in_ptr + 4) % 16384;
          access(va, 1'b0, 32'h0);
          n_sh++;
        end else begin
          logic w;
          if ($urandom_range(0, 9) < 7) va = {STACK_VPN, 12'h0} + 32'($urandom_range(0, 2047) * 4);
          else                         va = {STATE_VPN, 12'h0} + 32'($urandom_range(0, 4095) * 4);
          w = (r < SHR[b] + PWR[b]);
          access(va, w, $urandom());
          n_priv++;
          if (w) begin n_pw++; n_wr++; end
        end
      end
      $display("%s %-6s accesses=%0d shared=%0d writes=%0d private_writes=%0d misses=%0d tlb_lookups=%0d (baseline %0d, %0d%% fewer) adder_xlates=%0d ppl_hits=%0d",
               NAME, BN[b], N_PER_BENCH, n_sh, n_wr, n_pw, n_miss - miss0, n_tlb - tlb0, N_PER_BENCH,
               100 * (N_PER_BENCH - (n_tlb - tlb0)) / N_PER_BENCH, n_sot - sot0, n_ppl - ppl0);
      if (SHARED_TLB) begin
        ck(n_sot - sot0 == 0, $sformatf("%s: %0d adder translations", BN[b], n_sot - sot0));
        ck(n_tlb - tlb0 >= n_sh && n_tlb - tlb0 <= N_PER_BENCH,
           $sformatf("%s: %0d TLB lookups for %0d shared of %0d accesses",
                     BN[b], n_tlb - tlb0, n_sh, N_PER_BENCH));
      end else begin
        ck(n_sot - sot0 == n_sh, $sformatf("%s: %0d adder translations for %0d shared accesses",
                                           BN[b], n_sot - sot0, n_sh));
        ck(n_tlb - tlb0 <= n_priv, $sformatf("%s: %0d TLB lookups for %0d private accesses",
                                             BN[b], n_tlb - tlb0, n_priv));
      end
      if (WT && USE_PPL && n_pw > 20) ck(n_ppl - ppl0 > 0, $sformatf("%s: no PPL hit", BN[b]));
    end
    done = 1;
  end

endmodule
