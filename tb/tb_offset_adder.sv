// Self-checking test of offset_adder at the VPN width (20) and at the
// superset width (3): sums are compared with a 64-bit reference reduced
// modulo 2^W.
// The adder is purely combinational; results are checked 1 time unit after
// the inputs change. A watchdog bounds the run.
module tb_offset_adder;
  int checks = 0, failures = 0;
  logic [19:0] a20, b20, s20;
  logic [2:0]  a3, b3, s3;

  offset_adder #(.W(20)) u20 (.a(a20), .b(b20), .sum(s20));
  offset_adder #(.W(3))  u3  (.a(a3),  .b(b3),  .sum(s3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned r;
    for (int i = 0; i < 3000; i++) begin
      a20 = 20'($urandom()); b20 = 20'($urandom());
      a3  = 3'($urandom());  b3  = 3'($urandom());
      if (i == 0) begin a20 = '1; b20 = 20'd1; end
      #1;
      r = (longint'(a20) + longint'(b20)) % (64'd1 << 20);
      checks++;
      if (s20 != 20'(r)) begin failures++; $display("FAIL20 %h+%h=%h", a20, b20, s20); end
      r = (longint'(a3) + longint'(b3)) % 64'd8;
      checks++;
      if (s3 != 3'(r)) begin failures++; $display("FAIL3 %h+%h=%h", a3, b3, s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
