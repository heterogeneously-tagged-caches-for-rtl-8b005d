// Self-checking test of the write buffer: virtual entries are held back
// until translated, translation only happens when granted and hits, the
// oldest virtual entry is offered first, entries drain in FIFO order with
// their translated physical address, the full flag stops at DEPTH, and the
// miss check matches virtual entries by PID and virtual line and physical
// entries by physical line. A second, random phase runs 4000 cycles of
// random pushes, pops, TLB grants and hits, and miss checks against a
// queue model of the buffer, comparing every output in every cycle.
// Virtual entries, translation when the TLB is free and the dual-form
// miss check follow the method; line-wide entries are this design's own.
// Outputs are checked 1 time unit after each falling clock edge; a
// watchdog ends the run after 200000 time units.
module tb_write_buffer;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, push_virt, full, empty, head_valid, pop;
  logic [31:0] push_addr;
  pid_t push_pid, xl_pid, chk_pid;
  logic [255:0] push_data, head_data;
  logic [31:0] push_bmask, head_bmask;
  pa_t head_addr, chk_pa;
  va_t chk_va;
  logic xl_req, xl_gnt, xl_hit, xl_miss, chk_match;
  vpn_t xl_vpn;
  ppn_t xl_ppn;

  always #5 clk = ~clk;

  write_buffer #(.DEPTH(4), .LINE_BYTES(32)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic do_push(input logic [31:0] a, input logic v, input pid_t p, input logic [255:0] d);
    @(negedge clk);
    push = 1; push_addr = a; push_virt = v; push_pid = p; push_data = d; push_bmask = '1;
    @(negedge clk);
    push = 0;
  endtask

  // ---------------- random phase against a queue model ----------------
  typedef struct {
    logic         virt;
    pid_t         pid;
    logic [31:0]  addr;
    logic [255:0] data;
    logic [31:0]  bmask;
  } m_ent_t;
  m_ent_t q[$];

  function automatic ppn_t ppn_of(input pid_t p, input vpn_t v);
    return ppn_t'(v * 7 + 20'(p) * 20'h101 + 20'h3);
  endfunction

  task automatic random_phase(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      int ox;
      logic exp_match, want_push, want_pop;
      @(negedge clk);
      // choose this cycle's stimulus
      want_push  = ($urandom_range(0, 99) < 45) && (q.size() < 4);
      push       = want_push;
      push_virt  = $urandom_range(0, 1);
      push_pid   = pid_t'($urandom_range(0, 3));
      push_addr  = {4'h1, 8'($urandom_range(0, 3)), 15'($urandom()), 5'($urandom())};
      push_data  = {8{$urandom()}};
      push_bmask = $urandom();
      xl_gnt     = ($urandom_range(0, 1) == 1);
      xl_hit     = ($urandom_range(0, 9) < 7);
      // a miss check aimed at an entry about half of the time
      chk_pid = pid_t'($urandom_range(0, 3));
      chk_va  = {4'h1, 8'($urandom_range(0, 3)), 20'($urandom())};
      chk_pa  = $urandom();
      if (q.size() > 0 && $urandom_range(0, 1) == 1) begin
        int k;
        k = $urandom_range(0, q.size() - 1);
        if (q[k].virt) begin chk_va = {q[k].addr[31:5], 5'($urandom())}; chk_pid = q[k].pid; end
        else             chk_pa = {q[k].addr[31:5], 5'($urandom())};
      end
      // oldest virtual entry in the model
      ox = -1;
      foreach (q[i]) if (ox < 0 && q[i].virt) ox = i;
      xl_ppn = (ox >= 0) ? ppn_of(q[ox].pid, q[ox].addr[31:12]) : 20'h0;
      want_pop = (q.size() > 0) && !q[0].virt && ($urandom_range(0, 99) < 45);
      pop = want_pop;
      #1;
      ck(empty == (q.size() == 0) && full == (q.size() == 4), "rnd: empty/full flags");
      ck(head_valid == (q.size() > 0 && !q[0].virt), "rnd: head_valid");
      if (q.size() > 0 && !q[0].virt)
        ck(head_addr == q[0].addr && head_data == q[0].data && head_bmask == q[0].bmask, "rnd: head entry");
      ck(xl_req == (ox >= 0), "rnd: xl_req");
      if (ox >= 0) begin
        ck(xl_pid == q[ox].pid && xl_vpn == q[ox].addr[31:12], "rnd: oldest virtual entry offered");
        ck(xl_miss == (xl_gnt && !xl_hit), "rnd: xl_miss");
      end else begin
        ck(!xl_miss, "rnd: no xl_miss without a virtual entry");
      end
      exp_match = 1'b0;
      foreach (q[i]) begin
        if (q[i].virt && q[i].pid == chk_pid && q[i].addr[31:5] == chk_va[31:5]) exp_match = 1'b1;
        if (!q[i].virt && q[i].addr[31:5] == chk_pa[31:5]) exp_match = 1'b1;
      end
      ck(chk_match == exp_match, "rnd: miss check");
      // the clock edge: translate, push, pop
      if (ox >= 0 && xl_gnt && xl_hit) begin
        q[ox].virt = 1'b0;
        q[ox].addr = {xl_ppn, q[ox].addr[11:0]};
      end
      if (want_push) q.push_back('{push_virt, push_pid, push_addr, push_data, push_bmask});
      if (want_pop) void'(q.pop_front());
    end
    @(negedge clk);
    push = 0; pop = 0; xl_gnt = 0;
  endtask

  initial begin
    push = 0; pop = 0; xl_gnt = 0; xl_hit = 0; xl_ppn = 0; push_addr = 0; push_virt = 0;
    push_pid = 0; push_data = 0; push_bmask = 0; chk_pa = 0; chk_va = 0; chk_pid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    ck(empty && !full && !head_valid && !xl_req, "empty after reset");

    // A: virtual line of pid 3; B: physical line; C: virtual line of pid 5
    do_push(32'h1234_5660, 1, 4'd3, {8{32'hAAAA_0001}});
    do_push(32'h8000_1000, 0, 4'd0, {8{32'hBBBB_0002}});
    do_push(32'h0040_2020, 1, 4'd5, {8{32'hCCCC_0003}});
    #1;
    ck(!head_valid, "virtual head may not drain");
    ck(xl_req && xl_pid == 4'd3 && xl_vpn == 20'h12345, "oldest virtual entry offered");

    // miss checks
    chk_pid = 4'd3; chk_va = 32'h1234_567C; chk_pa = 32'h0;
    #1 ck(chk_match, "virtual match, same pid, same line");
    chk_pid = 4'd4;
    #1 ck(!chk_match, "virtual entry of another pid must not match");
    chk_va = 32'h0; chk_pa = 32'h8000_101F;
    #1 ck(chk_match, "physical match");
    chk_pa = 32'h8000_1020;
    #1 ck(!chk_match, "next physical line must not match");

    // grant without a TLB hit: stays virtual
    @(negedge clk); xl_gnt = 1; xl_hit = 0; #1 ck(xl_miss, "xl_miss on failed translation");
    @(negedge clk); xl_gnt = 0; #1 ck(!head_valid && xl_pid == 4'd3, "entry still virtual");
    // request without grant
    @(negedge clk); xl_hit = 1; xl_ppn = 20'h00777;
    @(negedge clk); #1 ck(!head_valid, "no translation without grant");
    // grant and hit
    xl_gnt = 1;
    @(negedge clk); xl_gnt = 0; #1;
    ck(head_valid && head_addr == 32'h0077_7660 && head_data == {8{32'hAAAA_0001}},
       "translated head address");
    ck(xl_req && xl_pid == 4'd5 && xl_vpn == 20'h00402, "next virtual entry offered");

    // fill to full
    do_push(32'h9000_0000, 0, 4'd0, {8{32'hDDDD_0004}});
    #1 ck(full, "full at 4 entries");

    // drain A, then B
    @(negedge clk); pop = 1; @(negedge clk); pop = 0; #1;
    ck(!full && head_valid && head_addr == 32'h8000_1000 && head_data == {8{32'hBBBB_0002}}, "FIFO order B");
    @(negedge clk); pop = 1; @(negedge clk); pop = 0; #1;
    ck(!head_valid, "C still virtual blocks the head");
    xl_ppn = 20'h00ABC; xl_hit = 1; xl_gnt = 1;
    @(negedge clk); xl_gnt = 0; #1;
    ck(head_valid && head_addr == 32'h00AB_C020, "C translated");
    ck(!xl_req, "no virtual entries left");
    @(negedge clk); pop = 1; @(negedge clk); #1;
    ck(head_valid && head_addr == 32'h9000_0000, "D at head");
    @(negedge clk); pop = 0; #1;
    ck(empty, "empty after draining");

    random_phase(4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
