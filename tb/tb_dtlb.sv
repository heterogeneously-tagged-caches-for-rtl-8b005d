// Self-checking test of the fully associative D-TLB: entries written at
// random slots are looked up with matching and non-matching PID and VPN;
// a reference model of the 32 slots gives the expected hit, PPN and AC.
// The lookup is combinational, checked in the cycle of the request; PID
// tagging of entries is this design's choice. A watchdog bounds the run.
module tb_dtlb;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pid_t lk_pid;
  vpn_t lk_vpn;
  logic lk_hit;
  ppn_t lk_ppn;
  ac_t  lk_ac;
  logic we;
  logic [4:0] wr_idx;
  tlb_entry_t wr_entry;
  tlb_entry_t model [32];

  always #5 clk = ~clk;

  dtlb #(.ENTRIES(32)) dut (.*);

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(input pid_t p, input vpn_t v);
    logic eh; ppn_t ep; ac_t ea;
    eh = 0; ep = 0; ea = 0;
    for (int i = 0; i < 32; i++)
      if (model[i].valid && model[i].pid == p && model[i].vpn == v) begin
        eh = 1; ep = model[i].ppn; ea = model[i].ac;
      end
    lk_pid = p; lk_vpn = v;
    #1;
    checks++;
    if (lk_hit != eh || (eh && (lk_ppn != ep || lk_ac != ea))) begin
      failures++;
      $display("FAIL pid=%0d vpn=%h hit=%0d/%0d ppn=%h/%h", p, v, lk_hit, eh, lk_ppn, ep);
    end
  endtask

  initial begin
    we = 0; wr_idx = 0; wr_entry = '0; lk_pid = 0; lk_vpn = 0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup(0, 0);
    // distinct VPNs per slot, two processes
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; wr_idx = 5'(i);
      wr_entry = '{valid: 1'b1, pid: pid_t'(i % 2), vpn: vpn_t'(20'h100 + i),
                   ppn: ppn_t'($urandom()), ac: ac_t'($urandom())};
      @(negedge clk);
      we = 0;
      model[i] = wr_entry;
    end
    for (int i = 0; i < 32; i++) begin
      lookup(pid_t'(i % 2), vpn_t'(20'h100 + i));       // hit
      lookup(pid_t'((i + 1) % 2), vpn_t'(20'h100 + i)); // wrong process
      lookup(pid_t'(i % 2), vpn_t'(20'h200 + i));       // absent page
    end
    // invalidate some, overwrite some
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      we = 1; wr_idx = 5'($urandom());
      wr_entry = '{valid: 1'($urandom()), pid: pid_t'($urandom_range(0, 1)),
                   vpn: vpn_t'(20'h300 + n), ppn: ppn_t'($urandom()), ac: ac_t'($urandom())};
      @(negedge clk);
      we = 0;
      model[wr_idx] = wr_entry;
      for (int i = 0; i < 32; i++) lookup(model[i].pid, model[i].vpn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
