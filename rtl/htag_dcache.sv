// Heterogeneously tagged data cache with low-power address translation.
//
// A virtually indexed data cache for an embedded processor with virtual
// memory, in which private data is virtually tagged (tag + PID) and needs
// no translation on a hit, and only data in interprocess shared buffers is
// physically tagged. Shared buffers live in the top quarter of the virtual
// address space; those in its upper half are translated without the TLB,
// by adding per-buffer offsets from the synonym offset table (SOT): a
// narrow superset adder gives the physical superset (colour) bits used in
// the cache index, so synonyms always meet in one set, and a 20-bit adder
// gives the PPN for the physical tag. Shared buffers in the lower half are
// translated by the TLB and aligned by the OS. The D-TLB is otherwise used
// only on misses, for translating evicted virtually tagged lines waiting
// in the write buffer, and, in the write-through variant, for stores that
// miss the physical page latch (PPL).
//
// Structure: region_decode -> sot -> two offset_adder instances feed the
// controller (dcache_ctrl) with the translated index and tag of the
// incoming request in the same cycle. The controller drives the
// cache_arrays, the write_buffer and, through the bus_arbiter, the memory
// bus. The single TLB lookup port is given to the controller first and to
// the write buffer whenever the controller does not use it.
//
// Interfaces: processor load/store port (valid/ready request, one-cycle
// response strobe), OS programming ports for the TLB and the SOT (one write
// per cycle), a line-wide memory bus (see bus_arbiter) and event strobes
// that count TLB lookups, adder translations and cache activity. Defaults:
// 32 KB direct-mapped cache with 32-byte lines, 32-entry TLB, 8-entry SOT,
// 4-entry write buffer, write-back; these sizes follow the evaluated
// XScale-like configuration except the line size, which is this design's.
// When a way is no larger than a 4 KB page (16 KB 4-way, for example)
// there are no superset bits; the superset ports then keep one unused bit.
// USE_PPL = 0 ignores the physical page latch, so that every write-through
// store is translated by the TLB or the adders, for comparison.
module htag_dcache
  import htag_pkg::*;
#(
  parameter int unsigned CACHE_BYTES   = 32768,
  parameter int unsigned WAYS          = 1,
  parameter int unsigned LINE_BYTES    = 32,
  parameter int unsigned TLB_ENTRIES   = 32,
  parameter int unsigned SOT_ENTRIES   = 8,
  parameter int unsigned WB_DEPTH      = 4,
  parameter bit          WRITE_THROUGH = 1'b0,
  parameter bit          USE_PPL       = 1'b1,   // write-through only
  localparam int unsigned SETS   = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W  = VA_W - SET_W - OFF_W,
  localparam int unsigned SS_W   = SET_W + OFF_W - PAGE_BITS,   // superset bits, may be 0
  localparam int unsigned SS_WP  = (SS_W > 0) ? SS_W : 1,       // their port width
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TENT_W = 3 + AC_W + PID_W + TAG_W,
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned SOT_IW = $clog2(SOT_ENTRIES),
  localparam int unsigned TLB_IW = $clog2(TLB_ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor
  input  pid_t                  pid,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  va_t                   req_addr,
  input  logic [31:0]           req_wdata,
  input  logic [3:0]            req_be,
  output logic                  resp_valid,
  output resp_e                 resp_status,
  output logic [31:0]           resp_rdata,
  // OS: TLB refill
  input  logic                  tlb_we,
  input  logic [TLB_IW-1:0]     tlb_wr_idx,
  input  tlb_entry_t            tlb_wr_entry,
  // OS: SOT programming
  input  logic                  sot_we,
  input  logic [SOT_IW-1:0]     sot_wr_idx,
  input  logic                  sot_wr_valid,
  input  ac_t                   sot_wr_ac,
  input  vpn_t                  sot_wr_vpn_off,
  input  logic [SS_WP-1:0]      sot_wr_ss_off,
  // memory bus
  output logic                  mem_req,
  output logic                  mem_we,
  output pa_t                   mem_addr,
  output logic [LINE_W-1:0]     mem_wdata,
  output logic [LINE_BYTES-1:0] mem_wmask,
  input  logic                  mem_ready,
  input  logic                  mem_rvalid,
  input  logic [LINE_W-1:0]     mem_rdata,
  // status and events
  output logic                  busy_init,
  output logic                  wb_empty,
  output logic                  wb_tlb_miss,    // a buffered eviction lacks a TLB entry:
  output pid_t                  wb_miss_pid,    //   its PID
  output vpn_t                  wb_miss_vpn,    //   and virtual page
  output logic                  ev_tlb_lookup,  // any TLB lookup this cycle
  output logic                  ev_sot_xlate,   // request translated by the adders
  output logic                  ev_ppl_hit,     // store translated by the PPL
  output logic                  ev_wb_xlate,    // write-buffer entry translated
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_evict,
  output logic                  ev_wb_wait
);

  // ---------------- request-side translation ----------------
  region_e            region;
  logic [SOT_IW-1:0]  sot_idx;
  logic               sot_valid;
  ac_t                sot_ac;
  vpn_t               sot_vpn_off;
  logic [SS_WP-1:0]   sot_ss_off;
  ppn_t               sot_ppn;
  logic [SS_WP-1:0]   sot_pss;

  region_decode #(.SOT_ENTRIES(SOT_ENTRIES)) u_region (
    .va      (req_addr),
    .region  (region),
    .sot_idx (sot_idx)
  );

  sot #(.ENTRIES(SOT_ENTRIES), .SS_W(SS_WP)) u_sot (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_idx     (sot_idx),
    .rd_valid   (sot_valid),
    .rd_ac      (sot_ac),
    .rd_vpn_off (sot_vpn_off),
    .rd_ss_off  (sot_ss_off),
    .we         (sot_we),
    .wr_idx     (sot_wr_idx),
    .wr_valid   (sot_wr_valid),
    .wr_ac      (sot_wr_ac),
    .wr_vpn_off (sot_wr_vpn_off),
    .wr_ss_off  (sot_wr_ss_off)
  );

  // superset offset adder: on the cache indexing path (unused when the
  // cache way is no larger than a page and there are no superset bits)
  offset_adder #(.W(SS_WP)) u_ss_add (
    .a   (req_addr[PAGE_BITS +: SS_WP]),
    .b   (sot_ss_off),
    .sum (sot_pss)
  );

  // VPN offset adder: replaces the TLB lookup for the SOT regions
  offset_adder #(.W(VPN_W)) u_vpn_add (
    .a   (req_addr[VA_W-1 -: VPN_W]),
    .b   (sot_vpn_off),
    .sum (sot_ppn)
  );

  // ---------------- TLB and its arbitration ----------------
  logic  c_tlb_req;
  pid_t  c_tlb_pid;
  vpn_t  c_tlb_vpn;
  logic  w_xl_req;
  pid_t  w_xl_pid;
  vpn_t  w_xl_vpn;
  logic  w_xl_gnt;
  pid_t  tlb_pid;
  vpn_t  tlb_vpn;
  logic  tlb_hit;
  ppn_t  tlb_ppn;
  ac_t   tlb_ac;

  assign w_xl_gnt = w_xl_req && !c_tlb_req;
  assign tlb_pid  = c_tlb_req ? c_tlb_pid : w_xl_pid;
  assign tlb_vpn  = c_tlb_req ? c_tlb_vpn : w_xl_vpn;

  dtlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_pid   (tlb_pid),
    .lk_vpn   (tlb_vpn),
    .lk_hit   (tlb_hit),
    .lk_ppn   (tlb_ppn),
    .lk_ac    (tlb_ac),
    .we       (tlb_we),
    .wr_idx   (tlb_wr_idx),
    .wr_entry (tlb_wr_entry)
  );

  // ---------------- physical page latch ----------------
  pid_t ppl_pid;
  vpn_t ppl_vpn;
  logic ppl_hit;
  ppn_t ppl_ppn;
  logic ppl_upd;
  ppn_t ppl_upd_ppn;

  ppl u_ppl (
    .clk     (clk),
    .rst_n   (rst_n),
    .lk_pid  (ppl_pid),
    .lk_vpn  (ppl_vpn),
    .hit     (ppl_hit),
    .ppn     (ppl_ppn),
    .upd     (ppl_upd),
    .upd_pid (ppl_pid),
    .upd_vpn (ppl_vpn),
    .upd_ppn (ppl_upd_ppn),
    .inv     (tlb_we)
  );

  // ---------------- arrays ----------------
  logic                        arr_rd_en;
  logic [SET_W-1:0]            arr_rd_set;
  logic [WAYS-1:0][TENT_W-1:0] arr_rd_tag;
  logic [WAYS-1:0][LINE_W-1:0] arr_rd_data;
  logic                        arr_tag_we;
  logic                        arr_data_we;
  logic [WAY_W-1:0]            arr_wr_way;
  logic [SET_W-1:0]            arr_wr_set;
  logic [TENT_W-1:0]           arr_wr_tag;
  logic [LINE_W-1:0]           arr_wr_data;
  logic [LINE_BYTES-1:0]       arr_wr_bmask;

  cache_arrays #(
    .CACHE_BYTES (CACHE_BYTES),
    .WAYS        (WAYS),
    .LINE_BYTES  (LINE_BYTES),
    .TENT_W      (TENT_W)
  ) u_arrays (
    .clk       (clk),
    .rst_n     (rst_n),
    .init_busy (busy_init),
    .rd_en     (arr_rd_en),
    .rd_set    (arr_rd_set),
    .rd_tag    (arr_rd_tag),
    .rd_data   (arr_rd_data),
    .tag_we    (arr_tag_we),
    .data_we   (arr_data_we),
    .wr_way    (arr_wr_way),
    .wr_set    (arr_wr_set),
    .wr_tag    (arr_wr_tag),
    .wr_data   (arr_wr_data),
    .wr_bmask  (arr_wr_bmask)
  );

  // ---------------- write buffer ----------------
  logic                  wb_push;
  va_t                   wb_push_addr;
  logic                  wb_push_virt;
  pid_t                  wb_push_pid;
  logic [LINE_W-1:0]     wb_push_data;
  logic [LINE_BYTES-1:0] wb_push_bmask;
  logic                  wb_full;
  logic                  wb_head_valid;
  pa_t                   wb_head_addr;
  logic [LINE_W-1:0]     wb_head_data;
  logic [LINE_BYTES-1:0] wb_head_bmask;
  logic                  wb_pop;
  pa_t                   wb_chk_pa;
  va_t                   wb_chk_va;
  pid_t                  wb_chk_pid;
  logic                  wb_chk_match;

  write_buffer #(.DEPTH(WB_DEPTH), .LINE_BYTES(LINE_BYTES)) u_wb (
    .clk        (clk),
    .rst_n      (rst_n),
    .push       (wb_push),
    .push_addr  (wb_push_addr),
    .push_virt  (wb_push_virt),
    .push_pid   (wb_push_pid),
    .push_data  (wb_push_data),
    .push_bmask (wb_push_bmask),
    .full       (wb_full),
    .empty      (wb_empty),
    .head_valid (wb_head_valid),
    .head_addr  (wb_head_addr),
    .head_data  (wb_head_data),
    .head_bmask (wb_head_bmask),
    .pop        (wb_pop),
    .xl_req     (w_xl_req),
    .xl_pid     (w_xl_pid),
    .xl_vpn     (w_xl_vpn),
    .xl_gnt     (w_xl_gnt),
    .xl_hit     (tlb_hit),
    .xl_ppn     (tlb_ppn),
    .xl_miss    (wb_tlb_miss),
    .chk_pa     (wb_chk_pa),
    .chk_va     (wb_chk_va),
    .chk_pid    (wb_chk_pid),
    .chk_match  (wb_chk_match)
  );

  // ---------------- memory bus ----------------
  logic              bus_rd_req;
  pa_t               bus_rd_addr;
  logic              bus_rd_gnt;
  logic              bus_rd_done;
  logic [LINE_W-1:0] bus_rd_data;

  bus_arbiter #(.LINE_BYTES(LINE_BYTES)) u_bus (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_req     (bus_rd_req),
    .rd_addr    (bus_rd_addr),
    .rd_gnt     (bus_rd_gnt),
    .rd_done    (bus_rd_done),
    .rd_data    (bus_rd_data),
    .wr_valid   (wb_head_valid),
    .wr_addr    (wb_head_addr),
    .wr_data    (wb_head_data),
    .wr_bmask   (wb_head_bmask),
    .wr_pop     (wb_pop),
    .mem_req    (mem_req),
    .mem_we     (mem_we),
    .mem_addr   (mem_addr),
    .mem_wdata  (mem_wdata),
    .mem_wmask  (mem_wmask),
    .mem_ready  (mem_ready),
    .mem_rvalid (mem_rvalid),
    .mem_rdata  (mem_rdata)
  );

  // ---------------- controller ----------------
  dcache_ctrl #(
    .CACHE_BYTES   (CACHE_BYTES),
    .WAYS          (WAYS),
    .LINE_BYTES    (LINE_BYTES),
    .WRITE_THROUGH (WRITE_THROUGH)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .pid           (pid),
    .req_valid     (req_valid),
    .req_ready     (req_ready),
    .req_we        (req_we),
    .req_addr      (req_addr),
    .req_wdata     (req_wdata),
    .req_be        (req_be),
    .resp_valid    (resp_valid),
    .resp_status   (resp_status),
    .resp_rdata    (resp_rdata),
    .xl_region     (region),
    .xl_sot_valid  (sot_valid),
    .xl_sot_ac     (sot_ac),
    .xl_sot_ppn    (sot_ppn),
    .xl_sot_pss    (sot_pss),
    .tlb_req       (c_tlb_req),
    .tlb_pid       (c_tlb_pid),
    .tlb_vpn       (c_tlb_vpn),
    .tlb_hit       (tlb_hit),
    .tlb_ppn       (tlb_ppn),
    .tlb_ac        (tlb_ac),
    .ppl_pid       (ppl_pid),
    .ppl_vpn       (ppl_vpn),
    .ppl_hit       (ppl_hit && USE_PPL),
    .ppl_ppn       (ppl_ppn),
    .ppl_upd       (ppl_upd),
    .ppl_upd_ppn   (ppl_upd_ppn),
    .arr_init_busy (busy_init),
    .arr_rd_en     (arr_rd_en),
    .arr_rd_set    (arr_rd_set),
    .arr_rd_tag    (arr_rd_tag),
    .arr_rd_data   (arr_rd_data),
    .arr_tag_we    (arr_tag_we),
    .arr_data_we   (arr_data_we),
    .arr_wr_way    (arr_wr_way),
    .arr_wr_set    (arr_wr_set),
    .arr_wr_tag    (arr_wr_tag),
    .arr_wr_data   (arr_wr_data),
    .arr_wr_bmask  (arr_wr_bmask),
    .wb_push       (wb_push),
    .wb_push_addr  (wb_push_addr),
    .wb_push_virt  (wb_push_virt),
    .wb_push_pid   (wb_push_pid),
    .wb_push_data  (wb_push_data),
    .wb_push_bmask (wb_push_bmask),
    .wb_full       (wb_full),
    .wb_chk_pa     (wb_chk_pa),
    .wb_chk_va     (wb_chk_va),
    .wb_chk_pid    (wb_chk_pid),
    .wb_chk_match  (wb_chk_match),
    .bus_rd_req    (bus_rd_req),
    .bus_rd_addr   (bus_rd_addr),
    .bus_rd_gnt    (bus_rd_gnt),
    .bus_rd_done   (bus_rd_done),
    .bus_rd_data   (bus_rd_data),
    .ev_hit        (ev_hit),
    .ev_miss       (ev_miss),
    .ev_evict      (ev_evict),
    .ev_ppl_hit    (ev_ppl_hit),
    .ev_wb_wait    (ev_wb_wait)
  );

  assign wb_miss_pid   = w_xl_pid;
  assign wb_miss_vpn   = w_xl_vpn;
  assign ev_tlb_lookup = c_tlb_req || w_xl_gnt;
  assign ev_sot_xlate  = req_valid && req_ready && (region == REG_SHARED_SOT);
  assign ev_wb_xlate   = w_xl_gnt && tlb_hit;

endmodule
