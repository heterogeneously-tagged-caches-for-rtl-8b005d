// Self-checking test of the synonym offset table: reset leaves every row
// invalid, programmed rows read back through the direct index, and a
// rewrite of one row leaves the others untouched.
// Row format (AC, VPN offset, superset offset) follows the method; the
// valid bit is this design's own. A watchdog bounds the run.
module tb_sot;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] rd_idx, wr_idx;
  logic rd_valid, we, wr_valid;
  ac_t rd_ac, wr_ac;
  vpn_t rd_vpn_off, wr_vpn_off;
  logic [2:0] rd_ss_off, wr_ss_off;
  logic [25:0] model [8];

  always #5 clk = ~clk;

  sot #(.ENTRIES(8), .SS_W(3)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(input int i, input logic v, input ac_t ac, input vpn_t off, input logic [2:0] ss);
    @(negedge clk);
    we = 1; wr_idx = 3'(i); wr_valid = v; wr_ac = ac; wr_vpn_off = off; wr_ss_off = ss;
    @(negedge clk);
    we = 0;
    model[i] = {v, ac, off, ss};
  endtask

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      rd_idx = 3'(i);
      #1;
      checks++;
      if ({rd_valid, rd_ac, rd_vpn_off, rd_ss_off} != model[i]) begin
        failures++;
        $display("FAIL row %0d got %h exp %h", i, {rd_valid, rd_ac, rd_vpn_off, rd_ss_off}, model[i]);
      end
    end
  endtask

  initial begin
    we = 0; wr_idx = 0; wr_valid = 0; wr_ac = 0; wr_vpn_off = 0; wr_ss_off = 0; rd_idx = 0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int i = 0; i < 8; i++)
      write_row(i, 1'b1, ac_t'($urandom()), vpn_t'($urandom()), 3'($urandom()));
    check_all();
    for (int n = 0; n < 50; n++) begin
      write_row(int'($urandom_range(0, 7)), 1'($urandom()), ac_t'($urandom()),
                vpn_t'($urandom()), 3'($urandom()));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
