// Self-checking test of region_decode: random and corner virtual
// addresses are classified against a reference written from the address
// map (top quarter shared, its upper half through the SOT, SOT row from
// the three bits below).
// The map follows the method; the choice of VA[28:26] as SOT index is
// this design's own. Combinational; a watchdog bounds the run.
module tb_region_decode;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  va_t va;
  region_e region;
  logic [2:0] idx;

  region_decode #(.SOT_ENTRIES(8)) dut (.va(va), .region(region), .sot_idx(idx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input va_t a);
    region_e exp_r;
    logic [2:0] exp_i;
    va = a;
    #1;
    if (a >= 32'hE000_0000)      exp_r = REG_SHARED_SOT;
    else if (a >= 32'hC000_0000) exp_r = REG_SHARED_TLB;
    else                         exp_r = REG_PRIVATE;
    exp_i = 3'((a >> 26) & 32'h7);
    checks++;
    if (region != exp_r || (exp_r == REG_SHARED_SOT && idx != exp_i)) begin
      failures++;
      $display("FAIL va=%h region=%0d exp=%0d idx=%0d exp=%0d", a, region, exp_r, idx, exp_i);
    end
  endtask

  initial begin
    check(32'h0000_0000); check(32'hBFFF_FFFF); check(32'hC000_0000);
    check(32'hDFFF_FFFF); check(32'hE000_0000); check(32'hFFFF_FFFF);
    check(32'hE400_0000); check(32'hFC00_1234); check(32'h8000_0000);
    for (int i = 0; i < 2000; i++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
