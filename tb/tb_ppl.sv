// Self-checking test of the physical page latch: empty after reset, hit
// only for the latched PID and VPN, reload on update, cleared by
// invalidate (which wins over a simultaneous update).
// The latch follows the method; its PID tag and the clear on a TLB write
// are this design's own. A watchdog bounds the run.
module tb_ppl;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pid_t lk_pid, upd_pid;
  vpn_t lk_vpn, upd_vpn;
  logic hit, upd, inv;
  ppn_t ppn, upd_ppn;

  always #5 clk = ~clk;

  ppl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_hit(input pid_t p, input vpn_t v, input logic eh, input ppn_t ep);
    lk_pid = p; lk_vpn = v;
    #1;
    checks++;
    if (hit != eh || (eh && ppn != ep)) begin
      failures++;
      $display("FAIL pid=%0d vpn=%h hit=%0d exp=%0d ppn=%h exp=%h", p, v, hit, eh, ppn, ep);
    end
  endtask

  task automatic load(input pid_t p, input vpn_t v, input ppn_t n, input logic i);
    @(negedge clk);
    upd = 1; upd_pid = p; upd_vpn = v; upd_ppn = n; inv = i;
    @(negedge clk);
    upd = 0; inv = 0;
  endtask

  initial begin
    upd = 0; inv = 0; upd_pid = 0; upd_vpn = 0; upd_ppn = 0; lk_pid = 0; lk_vpn = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_hit(0, 0, 0, 0);
    for (int n = 0; n < 100; n++) begin
      pid_t p; vpn_t v; ppn_t q;
      p = pid_t'($urandom()); v = vpn_t'($urandom()); q = ppn_t'($urandom());
      load(p, v, q, 0);
      expect_hit(p, v, 1, q);
      expect_hit(p, v ^ 20'h1, 0, 0);
      expect_hit(p ^ 4'h1, v, 0, 0);
      if (n % 10 == 9) begin
        load(p, v, q, 1);            // invalidate wins
        expect_hit(p, v, 0, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
