// Self-checking test of the tag comparator: exhaustive over the mode bits
// and valid bit, random tags and PIDs, with near-miss tags, against the
// rule "valid, same V/P bit, same tag, and same PID for virtual lines".
// The rule follows the method; the compare is combinational and checked
// 1 time unit after the inputs change. A watchdog bounds the run.
module tb_tag_compare;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  logic lv, lp, rp, hit;
  pid_t lpid, rpid;
  logic [16:0] ltag, rtag;

  tag_compare #(.TAG_W(17)) dut (
    .line_valid(lv), .line_phys(lp), .line_pid(lpid), .line_tag(ltag),
    .req_phys(rp), .req_pid(rpid), .req_tag(rtag), .hit(hit));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int m = 0; m < 8; m++) begin
        logic exp;
        {lv, lp, rp} = 3'(m);
        ltag = 17'($urandom()); lpid = pid_t'($urandom());
        case ($urandom_range(0, 3))
          0: begin rtag = ltag; rpid = lpid; end
          1: begin rtag = ltag; rpid = lpid ^ pid_t'(1 << $urandom_range(0, 3)); end
          2: begin rtag = ltag ^ 17'(1 << $urandom_range(0, 16)); rpid = lpid; end
          default: begin rtag = 17'($urandom()); rpid = pid_t'($urandom()); end
        endcase
        #1;
        exp = lv && (lp == rp) && (ltag == rtag) && (rp || lpid == rpid);
        checks++;
        if (hit != exp) begin
          failures++;
          $display("FAIL v=%0d lp=%0d rp=%0d tag %h/%h pid %0d/%0d hit=%0d", lv, lp, rp, ltag, rtag, lpid, rpid, hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
