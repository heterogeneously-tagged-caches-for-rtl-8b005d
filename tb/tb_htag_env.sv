// Test program for htag_dcache, shared by the end-to-end testbenches
// (write-back, write-through, and 16 KB 4-way). The DUT itself is
// instantiated by those, so each can choose its parameters.
//
// It plays processor and OS for three processes. The OS side fills the TLB
// from a page table on every RESP_TLB_MISS and retries, fills it also when
// the write buffer reports an untranslatable eviction, and programs the
// SOT with four rows: two views of one shared buffer whose virtual and
// physical superset bits differ (process 0 and process 1 see the same
// physical pages at different virtual addresses), a read-only buffer and an
// unprogrammed row. A third shared buffer is reached through the TLB half.
// A reference memory, word-addressed by physical address, predicts every
// load; stores update it. Directed sequences are followed by random
// traffic and a final read-back of every written word. Each mechanism of the design
// is counted from the event strobes and must occur at least once. When the
// program ends it raises done; the enclosing testbench prints the totals.
// Hits must answer in the cycle after acceptance (this design's timing).
// The address map, the SOT programming rule (superset offset = low bits
// of the VPN offset) and the PID-extended virtual tags follow the method;
// the OS protocol for TLB misses is this design's own.
module tb_htag_env
  import htag_pkg::*;
#(
  parameter bit WT         = 1'b0,
  parameter int N_RANDOM   = 3000,
  parameter int CACHE_SIZE = 32768,
  parameter int WAYS       = 1,
  parameter int TLB_IW     = 5,    // TLB write index width
  parameter int SSW        = 3     // SOT superset offset port width
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
  output logic                  done,       // program finished
  output int                    checks,     // totals, final once done rises
  output int                    failures
);

  logic stall = 0;

  initial clk = 0;
  always #5 clk = ~clk;

  tb_mem_model #(.LATENCY(4)) mem (.*);

  // ---------------- event counters ----------------
  int n_tlb = 0, n_sot = 0, n_ppl = 0, n_wbx = 0, n_hit = 0, n_miss = 0;
  int n_evict = 0, n_wbwait = 0, n_wbtlbmiss = 0;
  always @(posedge clk) if (rst_n) begin
    n_tlb      += int'(ev_tlb_lookup);
    n_sot      += int'(ev_sot_xlate);
    n_ppl      += int'(ev_ppl_hit);
    n_wbx      += int'(ev_wb_xlate);
    n_hit      += int'(ev_hit);
    n_miss     += int'(ev_miss);
    n_evict    += int'(ev_evict);
    n_wbwait   += int'(ev_wb_wait);
    n_wbtlbmiss+= int'(wb_tlb_miss);
  end
  int n_trap = 0, n_acfault = 0, n_synonym = 0, n_loads = 0, n_stores = 0, n_hitlat = 0;

  task automatic ck(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- OS view: page table and SOT contents ----------------
  localparam vpn_t SOT_BASE [4] = '{20'hE0003, 20'hE4005, 20'hE8000, 20'hEC000};
  localparam ppn_t SOT_PPN  [4] = '{20'h02006, 20'h02006, 20'h02100, 20'h00000};
  localparam ac_t  SOT_AC   [4] = '{2'b11, 2'b11, 2'b01, 2'b00};

  function automatic vpn_t sot_off(input int r);
    return vpn_t'(SOT_PPN[r] - SOT_BASE[r]);
  endfunction

  // returns 0 if unmapped
  function automatic logic page_table(input pid_t p, input vpn_t v, output ppn_t n, output ac_t a);
    n = '0; a = 2'b11;
    if (v < 20'd64 && p < 4'd3) begin
      n = ppn_t'(20'h01000 + (int'(p) << 8) + int'(v));
      if (p == 0 && v == 20'd63) a = 2'b01;
      return 1'b1;
    end
    if (p == 4'd0 && (v == 20'hC0001 || v == 20'hC0002)) begin
      n = ppn_t'(20'h03001 + (v - 20'hC0001)); return 1'b1;
    end
    if (p == 4'd1 && (v == 20'hC0109 || v == 20'hC010A)) begin
      n = ppn_t'(20'h03001 + (v - 20'hC0109)); return 1'b1;
    end
    return 1'b0;
  endfunction

  // expected physical address and outcome of an access
  function automatic resp_e expect_xlate(input pid_t p, input va_t va, input logic we, output pa_t pa);
    vpn_t v; ppn_t n; ac_t a; int r;
    v = va[31:12];
    pa = '0;
    if (va[31:29] == 3'b111) begin
      r = int'(va[28:26]);
      if (r > 3 || SOT_AC[r] == 2'b00) return RESP_AC_FAULT;
      n = v + sot_off(r);
      pa = {n, va[11:0]};
      return (we ? SOT_AC[r][1] : SOT_AC[r][0]) ? RESP_OK : RESP_AC_FAULT;
    end
    void'(page_table(p, v, n, a));
    pa = {n, va[11:0]};
    return (we ? a[1] : a[0]) ? RESP_OK : RESP_AC_FAULT;
  endfunction

  // ---------------- reference memory ----------------
  logic [31:0] ref_mem [logic [29:0]];
  pid_t        last_writer [logic [29:0]];
  va_t         last_va [logic [29:0]];

  function automatic logic [31:0] init_word(input pa_t pa);
    return {pa[31:2], 2'b00} ^ 32'h5EED_1234;
  endfunction

  function automatic logic [31:0] ref_read(input pa_t pa);
    return ref_mem.exists(pa[31:2]) ? ref_mem[pa[31:2]] : init_word(pa);
  endfunction

  // ---------------- OS actions ----------------
  int tlb_rr = 0;

  // one-cycle TLB fill on behalf of the write buffer, polled every cycle
  task automatic os_tick();
    ppn_t n; ac_t a;
    tlb_we = 1'b0;
    if (wb_tlb_miss && page_table(wb_miss_pid, wb_miss_vpn, n, a)) begin
      tlb_we = 1'b1;
      tlb_wr_idx = TLB_IW'(tlb_rr); tlb_rr++;
      tlb_wr_entry = '{valid: 1'b1, pid: wb_miss_pid, vpn: wb_miss_vpn, ppn: n, ac: a};
    end
  endtask

  task automatic os_fill(input pid_t p, input vpn_t v);
    ppn_t n; ac_t a;
    logic ok;
    ok = page_table(p, v, n, a);
    ck(ok, $sformatf("TLB miss on unmapped page pid=%0d vpn=%h", p, v));
    @(negedge clk);
    tlb_we = 1'b1;
    tlb_wr_idx = TLB_IW'(tlb_rr); tlb_rr++;
    tlb_wr_entry = '{valid: 1'b1, pid: p, vpn: v, ppn: n, ac: a};
    @(negedge clk);
    tlb_we = 1'b0;
  endtask

  // ---------------- processor access ----------------
  task automatic access(input pid_t p, input va_t va, input logic we,
                        input logic [31:0] wd, input logic [3:0] be);
    resp_e exp_st, st;
    pa_t pa;
    logic [31:0] rd;
    int waited, tries, miss0;
    exp_st = expect_xlate(p, va, we, pa);
    tries = 0;
    forever begin
      @(negedge clk);
      os_tick();
      pid = p; req_valid = 1'b1; req_we = we; req_addr = va; req_wdata = wd; req_be = be;
      while (!req_ready) begin @(negedge clk); os_tick(); end
      miss0 = n_miss;
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
        n_trap++;
        tries++;
        os_fill(p, va[31:12]);
        continue;
      end
      break;
    end
    ck(st == exp_st, $sformatf("status pid=%0d va=%h we=%0d got %0d exp %0d", p, va, we, st, exp_st));
    if (st == RESP_AC_FAULT) n_acfault++;
    if (n_miss == miss0 && st == RESP_OK && !(WT && we)) begin
      // a hit answers in the cycle after acceptance
      n_hitlat++;
      ck(waited == 0, $sformatf("hit latency %0d extra cycles", waited));
    end
    if (st != RESP_OK) return;
    if (we) begin
      logic [31:0] w;
      w = ref_read(pa);
      for (int b = 0; b < 4; b++) if (be[b]) w[b*8 +: 8] = wd[b*8 +: 8];
      ref_mem[pa[31:2]] = w;
      last_writer[pa[31:2]] = p;
      last_va[pa[31:2]] = va;
      n_stores++;
    end else begin
      n_loads++;
      ck(rd == ref_read(pa), $sformatf("load pid=%0d va=%h pa=%h got %h exp %h", p, va, pa, rd, ref_read(pa)));
      if (va[31:30] == 2'b11 && last_writer.exists(pa[31:2]) && last_writer[pa[31:2]] != p)
        n_synonym++;
    end
  endtask

  // random address of one of the kinds the OS has mapped
  function automatic va_t rand_va(input pid_t p, output logic ro);
    int k;
    logic [11:0] off;
    ro = 1'b0;
    off = {10'($urandom()), 2'b00};
    k = $urandom_range(0, 99);
    if (p == 4'd2 || k < 60) begin
      if (p == 4'd0 && $urandom_range(0, 49) == 0) begin ro = 1'b1; return {20'd63, off}; end
      return {20'($urandom_range(0, 47)), off};
    end
    if (k < 85) begin
      // shared buffer of two pages through the SOT
      return {(p == 4'd0 ? SOT_BASE[0] : SOT_BASE[1]) + 20'($urandom_range(0, 1)), off};
    end
    if (k < 95) return {(p == 4'd0 ? 20'hC0001 : 20'hC0109) + 20'($urandom_range(0, 1)), off};
    if (k < 98) begin ro = 1'b1; return {SOT_BASE[2], off}; end
    return {SOT_BASE[3], off};
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 0; pid = 0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    tlb_we = 0; tlb_wr_idx = 0; tlb_wr_entry = '0;
    sot_we = 0; sot_wr_idx = 0; sot_wr_valid = 0; sot_wr_ac = 0; sot_wr_vpn_off = 0; sot_wr_ss_off = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // OS programs the SOT: VPN offset, and superset offset = its low bits
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      sot_we = 1; sot_wr_idx = 3'(r); sot_wr_valid = (SOT_AC[r] != 2'b00);
      sot_wr_ac = SOT_AC[r]; sot_wr_vpn_off = sot_off(r); sot_wr_ss_off = SSW'(sot_off(r));
    end
    @(negedge clk); sot_we = 0;
    while (busy_init) @(negedge clk);

    // directed: synonyms with misaligned superset bits meet in one line
    access(4'd0, 32'hE000_3A40, 1'b1, 32'hCAFE_0001, 4'hF);
    access(4'd1, 32'hE400_5A40, 1'b0, 32'h0, 4'h0);
    access(4'd1, 32'hE400_5A44, 1'b1, 32'hBEEF_0002, 4'h3);
    access(4'd0, 32'hE000_3A44, 1'b0, 32'h0, 4'h0);
    // directed: same virtual address, different processes
    access(4'd0, 32'h0000_2000, 1'b1, 32'h1111_0000, 4'hF);
    access(4'd1, 32'h0000_2000, 1'b1, 32'h2222_0000, 4'hF);
    access(4'd0, 32'h0000_2000, 1'b0, 32'h0, 4'h0);
    access(4'd1, 32'h0000_2000, 1'b0, 32'h0, 4'h0);
    // directed: a missing line still in the write buffer
    access(4'd2, 32'h0000_0100, 1'b1, 32'h3333_0000, 4'hF);
    stall = 1'b1;  // memory refuses writes for a while
    for (int k = 1; k <= WAYS; k++)
      access(4'd2, 32'h0000_0100 + k * (CACHE_SIZE / WAYS), 1'b1, 32'h4444_0000 + k, 4'hF);
    fork
      access(4'd2, 32'h0000_0100, 1'b0, 32'h0, 4'h0);
      begin repeat (20) @(negedge clk); stall = 1'b0; end
    join
    // directed: a run of stores to one page
    for (int i = 0; i < 16; i++) access(4'd2, 32'h0000_5000 + 4 * i, 1'b1, 32'(i), 4'hF);
    for (int i = 0; i < 16; i++) access(4'd2, 32'h0000_5000 + 4 * i, 1'b1, 32'(i + 100), 4'hF);

    // random traffic
    for (int n = 0; n < N_RANDOM; n++) begin
      pid_t p; va_t va; logic ro, we;
      p  = pid_t'($urandom_range(0, 2));
      va = rand_va(p, ro);
      we = ($urandom_range(0, 99) < 40);
      access(p, va, we, $urandom(), (we ? 4'($urandom_range(1, 15)) : 4'h0));
    end

    // read back every word written, through a virtual address that maps it
    foreach (last_va[w]) access(last_writer[w], last_va[w], 1'b0, 32'h0, 4'h0);

    // write-through: memory itself must now hold every store
    if (WT) begin
      int waited;
      waited = 0;
      while (!wb_empty && waited < 1000) begin @(negedge clk); os_tick(); waited++; end
      repeat (4) @(negedge clk);
      foreach (ref_mem[w]) ck(mem.peek({w, 2'b00}) == ref_mem[w],
                              $sformatf("memory word %h after write-through", {w, 2'b00}));
    end

    $display("loads=%0d stores=%0d hits=%0d misses=%0d evictions=%0d", n_loads, n_stores, n_hit, n_miss, n_evict);
    $display("tlb_lookups=%0d sot_translations=%0d ppl_hits=%0d wb_translations=%0d wb_tlb_misses=%0d",
             n_tlb, n_sot, n_ppl, n_wbx, n_wbtlbmiss);
    $display("tlb_traps=%0d ac_faults=%0d synonym_reads=%0d wb_waits=%0d hit_latency_checks=%0d",
             n_trap, n_acfault, n_synonym, n_wbwait, n_hitlat);
    ck(n_hit > 0, "no cache hit");
    ck(n_miss > 0, "no cache miss");
    ck(n_tlb > 0, "no TLB lookup");
    ck(n_sot > 0, "no adder translation");
    ck(n_trap > 0, "no TLB miss trap");
    ck(n_acfault > 0, "no access-control fault");
    ck(n_synonym > 0, "no cross-process synonym read");
    ck(n_hitlat > 0, "no hit latency check");
    if (WT) begin
      ck(n_ppl > 0, "no PPL hit");
    end else begin
      ck(n_evict > 0, "no dirty eviction");
      ck(n_wbx > 0, "no write-buffer translation");
      ck(n_wbtlbmiss > 0, "no write-buffer TLB miss");
      // with several ways the directed sequence need not evict that line
      if (WAYS == 1) ck(n_wbwait > 0, "no wait on a buffered line");
    end
    done = 1'b1;
  end

endmodule
