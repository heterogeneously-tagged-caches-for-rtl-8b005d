// Controller of the heterogeneously tagged data cache.
//
// Every line is virtually indexed, but its tag is either virtual (private
// data: virtual tag extended with the PID, V/P = 0) or physical (shared
// data: V/P = 1). The region of the incoming virtual address decides which:
//   private      set = virtual index, tag = virtual tag; no translation on a
//                hit, the TLB is used only on a miss;
//   shared, SOT  set = virtual index whose superset bits are replaced by
//                the physical ones from the superset offset adder, tag =
//                physical tag from the VPN offset adder; the TLB is unused;
//   shared, TLB  set = virtual index (the OS aligns these pages), tag =
//                physical tag from a TLB lookup made when the request is
//                accepted.
// The region decode, SOT read and both adders act on the request address
// combinationally, outside this module, and arrive on the xl_* inputs.
//
// Sequence (one request at a time):
//   IDLE    accept a request, read the arrays at the selected set;
//   LOOKUP  compare tags of all ways; a hit answers here (load data, store
//           written into the line). Two cycles from acceptance to answer.
//   XLATE   miss: translate a private address through the TLB (top
//           priority on the TLB) and check the access rights;
//   EVICT   a dirty victim enters the write buffer at once with its stored
//           tag: a virtual line with its virtual address and V bit set, to
//           be translated later by the buffer, a physical line as is;
//   WBCHK   wait while the write buffer still holds the missing line;
//   REFILL/RWAIT  read the line from memory and write it with its tag,
//           V/P bit, PID and access-control bits;
//   REISSUE read the set again and return to LOOKUP, which now hits.
// With WRITE_THROUGH = 1 no line is ever dirty; a store hit also sends the
// word to the write buffer with its physical address, taken from the
// adders (SOT region), the TLB-region translation, the physical page latch
// (PPL) or, when the latch misses, a TLB lookup that reloads the latch
// (WTPUSH waits for room in the buffer).
//
// Responses: resp_valid for one cycle with resp_status (RESP_OK,
// RESP_TLB_MISS for a missing translation, RESP_AC_FAULT for an access
// right violation or an unprogrammed SOT row) and, for loads, resp_rdata.
// Word accesses with byte enables. Choices of this design, not of the
// method: two-cycle hit, write-allocate for both policies, invalid way
// first then one global round-robin pointer for the victim, waiting for a
// matching write-buffer entry to drain instead of forwarding from it.
module dcache_ctrl
  import htag_pkg::*;
#(
  parameter int unsigned CACHE_BYTES   = 32768,
  parameter int unsigned WAYS          = 1,
  parameter int unsigned LINE_BYTES    = 32,
  parameter bit          WRITE_THROUGH = 1'b0,
  localparam int unsigned SETS   = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W  = VA_W - SET_W - OFF_W,
  localparam int unsigned SS_W   = SET_W + OFF_W - PAGE_BITS,   // superset bits, may be 0
  localparam int unsigned SS_WP  = (SS_W > 0) ? SS_W : 1,       // port width
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TENT_W = 3 + AC_W + PID_W + TAG_W,
  localparam int unsigned LINE_W = LINE_BYTES * 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor port
  input  pid_t                        pid,
  input  logic                        req_valid,
  output logic                        req_ready,
  input  logic                        req_we,
  input  va_t                         req_addr,
  input  logic [31:0]                 req_wdata,
  input  logic [3:0]                  req_be,
  output logic                        resp_valid,
  output resp_e                       resp_status,
  output logic [31:0]                 resp_rdata,
  // translation of the request address by region decode, SOT and adders
  input  region_e                     xl_region,
  input  logic                        xl_sot_valid,
  input  ac_t                         xl_sot_ac,
  input  ppn_t                        xl_sot_ppn,
  input  logic [SS_WP-1:0]            xl_sot_pss,
  // TLB lookup port (has priority over the write buffer)
  output logic                        tlb_req,
  output pid_t                        tlb_pid,
  output vpn_t                        tlb_vpn,
  input  logic                        tlb_hit,
  input  ppn_t                        tlb_ppn,
  input  ac_t                         tlb_ac,
  // physical page latch
  output pid_t                        ppl_pid,
  output vpn_t                        ppl_vpn,
  input  logic                        ppl_hit,
  input  ppn_t                        ppl_ppn,
  output logic                        ppl_upd,
  output ppn_t                        ppl_upd_ppn,
  // cache arrays
  input  logic                        arr_init_busy,
  output logic                        arr_rd_en,
  output logic [SET_W-1:0]            arr_rd_set,
  input  logic [WAYS-1:0][TENT_W-1:0] arr_rd_tag,
  input  logic [WAYS-1:0][LINE_W-1:0] arr_rd_data,
  output logic                        arr_tag_we,
  output logic                        arr_data_we,
  output logic [WAY_W-1:0]            arr_wr_way,
  output logic [SET_W-1:0]            arr_wr_set,
  output logic [TENT_W-1:0]           arr_wr_tag,
  output logic [LINE_W-1:0]           arr_wr_data,
  output logic [LINE_BYTES-1:0]       arr_wr_bmask,
  // write buffer
  output logic                        wb_push,
  output va_t                         wb_push_addr,
  output logic                        wb_push_virt,
  output pid_t                        wb_push_pid,
  output logic [LINE_W-1:0]           wb_push_data,
  output logic [LINE_BYTES-1:0]       wb_push_bmask,
  input  logic                        wb_full,
  output pa_t                         wb_chk_pa,
  output va_t                         wb_chk_va,
  output pid_t                        wb_chk_pid,
  input  logic                        wb_chk_match,
  // memory refill through the bus arbiter
  output logic                        bus_rd_req,
  output pa_t                         bus_rd_addr,
  input  logic                        bus_rd_gnt,
  input  logic                        bus_rd_done,
  input  logic [LINE_W-1:0]           bus_rd_data,
  // event strobes
  output logic                        ev_hit,
  output logic                        ev_miss,
  output logic                        ev_evict,
  output logic                        ev_ppl_hit,
  output logic                        ev_wb_wait
);

  typedef struct packed {
    logic             valid;
    logic             dirty;
    ac_t              ac;
    logic             phys;
    pid_t             pid;
    logic [TAG_W-1:0] tag;
  } tag_ent_t;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_XLATE, S_EVICT, S_WBCHK,
    S_REFILL, S_RWAIT, S_REISSUE, S_WTPUSH
  } state_e;

  state_e state_q, state_d;

  // registered request
  va_t               q_va;
  logic              q_we;
  logic [31:0]       q_wdata;
  logic [3:0]        q_be;
  pid_t              q_pid;
  logic              q_phys;     // physically tagged (shared region)
  logic [SET_W-1:0]  q_set;
  logic [TAG_W-1:0]  q_tag;
  ppn_t              q_ppn;      // valid once translated
  ac_t               q_ac;
  resp_e             q_err;      // translation outcome known at acceptance
  logic [WAY_W-1:0]  q_way;      // hit or victim way
  logic [WAY_W-1:0]  rr_q;       // round-robin victim pointer
  pa_t               q_wt_pa;    // write-through store waiting for the buffer

  // ------------------------------------------------------------------
  // request-side address formation
  // ------------------------------------------------------------------
  logic [SET_W-1:0] in_set;
  logic [TAG_W-1:0] in_tag;
  logic             in_phys;
  resp_e            in_err;
  ppn_t             in_ppn;
  ac_t              in_ac;

  always_comb begin
    in_phys = (xl_region != REG_PRIVATE);
    in_set  = req_addr[OFF_W +: SET_W];
    in_tag  = req_addr[VA_W-1 -: TAG_W];
    in_ppn  = '0;
    in_ac   = '0;
    in_err  = RESP_OK;
    unique case (xl_region)
      REG_SHARED_SOT: begin
        // physical superset bits from the adder replace the virtual ones
        if (SS_W > 0) in_set = SET_W'({xl_sot_pss, req_addr[PAGE_BITS-1:OFF_W]});
        in_ppn = xl_sot_ppn;
        in_tag = xl_sot_ppn[PPN_W-1 -: TAG_W];
        in_ac  = xl_sot_ac;
        if (!xl_sot_valid) in_err = RESP_AC_FAULT;
      end
      REG_SHARED_TLB: begin
        in_ppn = tlb_ppn;
        in_tag = tlb_ppn[PPN_W-1 -: TAG_W];
        in_ac  = tlb_ac;
        if (!tlb_hit) in_err = RESP_TLB_MISS;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------------
  // tag comparison of all ways
  // ------------------------------------------------------------------
  tag_ent_t         way_ent [WAYS];
  logic [WAYS-1:0]  way_hit;
  logic             hit;
  logic [WAY_W-1:0] hit_way;

  for (genvar w = 0; w < int'(WAYS); w++) begin : g_cmp
    assign way_ent[w] = tag_ent_t'(arr_rd_tag[w]);
    tag_compare #(.TAG_W(TAG_W)) u_cmp (
      .line_valid (way_ent[w].valid),
      .line_phys  (way_ent[w].phys),
      .line_pid   (way_ent[w].pid),
      .line_tag   (way_ent[w].tag),
      .req_phys   (q_phys),
      .req_pid    (q_pid),
      .req_tag    (q_tag),
      .hit        (way_hit[w])
    );
  end

  always_comb begin
    hit     = |way_hit;
    hit_way = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (way_hit[w]) hit_way = WAY_W'(w);
  end

  // victim: first invalid way, else round robin
  logic [WAY_W-1:0] vic_way;
  logic             vic_found;
  always_comb begin
    vic_found = 1'b0;
    vic_way = (WAYS > 1) ? rr_q : '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (!vic_found && !way_ent[w].valid) begin
        vic_found = 1'b1;
        vic_way = WAY_W'(w);
      end
  end

  tag_ent_t hit_ent, vic_ent;
  assign hit_ent = way_ent[hit_way];
  assign vic_ent = way_ent[q_way];

  localparam int unsigned WORD_W = OFF_W - 2;
  logic [WORD_W-1:0]     word_idx;
  logic [LINE_W-1:0]     st_line;
  logic [LINE_BYTES-1:0] st_bmask;
  assign word_idx = q_va[OFF_W-1:2];
  assign st_line  = {(LINE_BYTES/4){q_wdata}};
  assign st_bmask = LINE_BYTES'(q_be) << (4 * word_idx);

  pa_t miss_pa;
  assign miss_pa = {q_ppn, q_va[PAGE_BITS-1:0]};

  // ------------------------------------------------------------------
  // main FSM
  // ------------------------------------------------------------------
  logic  ld_req;        // accept a request
  logic  ld_xlate;      // store private translation
  logic  ld_wt;         // store write-through physical address
  pa_t   wt_pa;
  logic  rr_step;
  logic  wt_pa_ok;      // physical address of a write-through store known
  logic  wt_use_ppl;    // ... from the physical page latch
  logic  wt_use_tlb;    // ... from a TLB lookup

  // physical address of a write-through store hit
  always_comb begin
    wt_use_ppl = 1'b0;
    wt_use_tlb = 1'b0;
    wt_pa_ok   = 1'b1;
    wt_pa      = miss_pa;
    if (!q_phys) begin
      if (ppl_hit) begin
        wt_use_ppl = 1'b1;
        wt_pa      = {ppl_ppn, q_va[PAGE_BITS-1:0]};
      end else begin
        wt_use_tlb = 1'b1;
        wt_pa      = {tlb_ppn, q_va[PAGE_BITS-1:0]};
        wt_pa_ok   = tlb_hit;
      end
    end
  end

  always_comb begin
    state_d      = state_q;
    req_ready    = (state_q == S_IDLE) && !arr_init_busy;
    resp_valid   = 1'b0;
    resp_status  = RESP_OK;
    resp_rdata   = arr_rd_data[hit_way][32*word_idx +: 32];
    tlb_req      = 1'b0;
    tlb_pid      = pid;
    tlb_vpn      = req_addr[VA_W-1 -: VPN_W];
    ppl_pid      = q_pid;
    ppl_vpn      = q_va[VA_W-1 -: VPN_W];
    ppl_upd      = 1'b0;
    ppl_upd_ppn  = tlb_ppn;
    arr_rd_en    = 1'b0;
    arr_rd_set   = in_set;
    arr_tag_we   = 1'b0;
    arr_data_we  = 1'b0;
    arr_wr_way   = hit_way;
    arr_wr_set   = q_set;
    arr_wr_tag   = TENT_W'(hit_ent);
    arr_wr_data  = st_line;
    arr_wr_bmask = st_bmask;
    wb_push      = 1'b0;
    wb_push_addr = q_wt_pa;
    wb_push_virt = 1'b0;
    wb_push_pid  = q_pid;
    wb_push_data = st_line;
    wb_push_bmask= st_bmask;
    wb_chk_pa    = miss_pa;
    wb_chk_va    = q_va;
    wb_chk_pid   = q_pid;
    bus_rd_req   = 1'b0;
    bus_rd_addr  = {miss_pa[PA_W-1:OFF_W], OFF_W'(0)};
    ld_req       = 1'b0;
    ld_xlate     = 1'b0;
    ld_wt        = 1'b0;
    rr_step      = 1'b0;
    ev_hit       = 1'b0;
    ev_miss      = 1'b0;
    ev_evict     = 1'b0;
    ev_ppl_hit   = 1'b0;
    ev_wb_wait   = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (req_valid && req_ready) begin
          ld_req    = 1'b1;
          arr_rd_en = 1'b1;
          tlb_req   = (xl_region == REG_SHARED_TLB);
          state_d   = S_LOOKUP;
        end
      end

      S_LOOKUP: begin
        if (q_err != RESP_OK) begin
          resp_valid  = 1'b1;
          resp_status = q_err;
          state_d     = S_IDLE;
        end else if (hit) begin
          ev_hit = 1'b1;
          if (!ac_allows(hit_ent.ac, q_we)) begin
            resp_valid  = 1'b1;
            resp_status = RESP_AC_FAULT;
            state_d     = S_IDLE;
          end else if (!q_we) begin
            resp_valid = 1'b1;
            state_d    = S_IDLE;
          end else if (!WRITE_THROUGH) begin
            // write-back: update the line and mark it dirty
            arr_data_we = 1'b1;
            arr_tag_we  = 1'b1;
            arr_wr_tag  = TENT_W'(tag_ent_t'{valid: 1'b1, dirty: 1'b1, ac: hit_ent.ac,
                                             phys: hit_ent.phys, pid: hit_ent.pid,
                                             tag: hit_ent.tag});
            resp_valid  = 1'b1;
            state_d     = S_IDLE;
          end else begin
            // write-through: the store needs its physical address
            tlb_req    = wt_use_tlb;
            tlb_pid    = q_pid;
            tlb_vpn    = q_va[VA_W-1 -: VPN_W];
            ppl_upd    = wt_use_tlb && tlb_hit;
            ev_ppl_hit = wt_use_ppl;
            if (!wt_pa_ok) begin
              resp_valid  = 1'b1;
              resp_status = RESP_TLB_MISS;
              state_d     = S_IDLE;
            end else begin
              arr_data_we  = 1'b1;
              wb_push_addr = wt_pa;
              if (!wb_full) begin
                wb_push    = 1'b1;
                resp_valid = 1'b1;
                state_d    = S_IDLE;
              end else begin
                ld_wt   = 1'b1;
                state_d = S_WTPUSH;
              end
            end
          end
        end else begin
          ev_miss = 1'b1;
          state_d = S_XLATE;
        end
      end

      S_XLATE: begin
        if (q_phys) begin
          if (!ac_allows(q_ac, q_we)) begin
            resp_valid  = 1'b1;
            resp_status = RESP_AC_FAULT;
            state_d     = S_IDLE;
          end else begin
            state_d = S_EVICT;
          end
        end else begin
          tlb_req = 1'b1;
          tlb_pid = q_pid;
          tlb_vpn = q_va[VA_W-1 -: VPN_W];
          if (!tlb_hit) begin
            resp_valid  = 1'b1;
            resp_status = RESP_TLB_MISS;
            state_d     = S_IDLE;
          end else if (!ac_allows(tlb_ac, q_we)) begin
            resp_valid  = 1'b1;
            resp_status = RESP_AC_FAULT;
            state_d     = S_IDLE;
          end else begin
            ld_xlate = 1'b1;
            // a write-through store will need this page again: latch it
            ppl_upd  = WRITE_THROUGH && q_we;
            state_d  = S_EVICT;
          end
        end
      end

      S_EVICT: begin
        if (vic_ent.valid && vic_ent.dirty) begin
          wb_push_addr  = {vic_ent.tag, q_set, OFF_W'(0)};
          wb_push_virt  = !vic_ent.phys;
          wb_push_pid   = vic_ent.pid;
          wb_push_data  = arr_rd_data[q_way];
          wb_push_bmask = '1;
          if (!wb_full) begin
            wb_push  = 1'b1;
            ev_evict = 1'b1;
            state_d  = S_WBCHK;
          end
        end else begin
          state_d = S_WBCHK;
        end
      end

      S_WBCHK: begin
        if (wb_chk_match) ev_wb_wait = 1'b1;
        else              state_d    = S_REFILL;
      end

      S_REFILL: begin
        bus_rd_req = 1'b1;
        if (bus_rd_gnt) state_d = S_RWAIT;
      end

      S_RWAIT: begin
        if (bus_rd_done) begin
          arr_tag_we   = 1'b1;
          arr_data_we  = 1'b1;
          arr_wr_way   = q_way;
          arr_wr_tag   = TENT_W'(tag_ent_t'{valid: 1'b1, dirty: 1'b0, ac: q_ac,
                                            phys: q_phys, pid: q_pid, tag: q_tag});
          arr_wr_data  = bus_rd_data;
          arr_wr_bmask = '1;
          rr_step      = 1'b1;
          state_d      = S_REISSUE;
        end
      end

      S_REISSUE: begin
        arr_rd_en  = 1'b1;
        arr_rd_set = q_set;
        state_d    = S_LOOKUP;
      end

      S_WTPUSH: begin
        wb_push_addr = q_wt_pa;
        if (!wb_full) begin
          wb_push    = 1'b1;
          resp_valid = 1'b1;
          state_d    = S_IDLE;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      q_va    <= '0;
      q_we    <= 1'b0;
      q_wdata <= '0;
      q_be    <= '0;
      q_pid   <= '0;
      q_phys  <= 1'b0;
      q_set   <= '0;
      q_tag   <= '0;
      q_ppn   <= '0;
      q_ac    <= '0;
      q_err   <= RESP_OK;
      q_way   <= '0;
      rr_q    <= '0;
      q_wt_pa <= '0;
    end else begin
      state_q <= state_d;
      if (ld_req) begin
        q_va    <= req_addr;
        q_we    <= req_we;
        q_wdata <= req_wdata;
        q_be    <= req_be;
        q_pid   <= pid;
        q_phys  <= in_phys;
        q_set   <= in_set;
        q_tag   <= in_tag;
        q_ppn   <= in_ppn;
        q_ac    <= in_ac;
        q_err   <= in_err;
      end
      if (state_q == S_LOOKUP) q_way <= hit ? hit_way : vic_way;
      if (ld_xlate) begin
        q_ppn <= tlb_ppn;
        q_ac  <= tlb_ac;
      end
      if (ld_wt) q_wt_pa <= wt_pa;
      if (rr_step && WAYS > 1) rr_q <= (rr_q == WAY_W'(WAYS - 1)) ? '0 : rr_q + 1'b1;
    end
  end

  // a request is only accepted while idle; the arrays never hold two
  // valid lines with the same tag in one set
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_LOOKUP) |-> $onehot0(way_hit));

endmodule
