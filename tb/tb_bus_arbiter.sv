// Self-checking test of the bus arbiter: a refill wins over a pending
// write, writes are blocked while a read awaits its data, a write goes out
// when the bus is free, and nothing is granted while mem_ready is low.
// A random phase then plays a cache that holds rd_req until granted and
// waits for its line, a write buffer that offers random entries, and a
// memory with random ready and read latency, for 5000 cycles. It checks
// every bus output each cycle against the rules: a refill request goes out
// first, no write while a read is outstanding, a grant or pop only with
// mem_ready, and each read answered to the cache exactly once.
// Read priority and writes only on an idle bus follow the method; the bus
// handshake is this design's own. A watchdog ends the run after 100000
// time units.
module tb_bus_arbiter;
  import htag_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rd_req, rd_gnt, rd_done, wr_valid, wr_pop;
  pa_t rd_addr, wr_addr, mem_addr;
  logic [255:0] rd_data, wr_data, mem_wdata, mem_rdata;
  logic [31:0] wr_bmask, mem_wmask;
  logic mem_req, mem_we, mem_ready, mem_rvalid;

  always #5 clk = ~clk;

  bus_arbiter #(.LINE_BYTES(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- random phase ----------------
  task automatic random_phase(input int cycles);
    logic waiting;      // cache: granted, line not yet back
    logic pend;         // reference: a read is outstanding on the bus
    int   lat;          // memory: cycles until the read data
    int   n_rd, n_done, n_wr;
    waiting = 0; pend = 0; lat = -1; n_rd = 0; n_done = 0; n_wr = 0;
    for (int c = 0; c < cycles; c++) begin
      logic exp_rd, exp_wr;
      @(negedge clk);
      if (waiting) rd_req = 1'b0;   // granted at the last edge
      if (!waiting && !rd_req && $urandom_range(0, 9) < 3) begin
        rd_req  = 1'b1;
        rd_addr = {$urandom()} & 32'hFFFF_FFE0;
      end
      wr_valid  = ($urandom_range(0, 9) < 6);
      wr_addr   = {$urandom()} & 32'hFFFF_FFE0;
      wr_data   = {8{$urandom()}};
      wr_bmask  = $urandom();
      mem_ready = ($urandom_range(0, 9) < 7);
      mem_rvalid = (lat == 0);
      mem_rdata  = {8{$urandom()}};
      #1;
      exp_rd = rd_req && !pend;
      exp_wr = !rd_req && !pend && wr_valid;
      ck(mem_req == (exp_rd || exp_wr), "rnd: mem_req");
      if (exp_rd) ck(!mem_we && mem_addr == rd_addr, "rnd: refill on the bus");
      if (exp_wr) ck(mem_we && mem_addr == wr_addr && mem_wdata == wr_data && mem_wmask == wr_bmask,
                     "rnd: write on the bus");
      ck(rd_gnt == (exp_rd && mem_ready), "rnd: rd_gnt");
      ck(wr_pop == (exp_wr && mem_ready), "rnd: wr_pop");
      ck(!(wr_pop && pend), "rnd: no write while a read is outstanding");
      ck(rd_done == mem_rvalid && (!rd_done || rd_data == mem_rdata), "rnd: refill data");
      // clock edge
      if (rd_gnt) begin pend = 1; waiting = 1; lat = $urandom_range(1, 6); n_rd++; end
      else if (lat > 0) lat--;
      if (rd_done) begin pend = 0; waiting = 0; lat = -1; n_done++; end
      if (wr_pop) n_wr++;
    end
    @(negedge clk);
    ck(n_rd > 100 && n_wr > 100, $sformatf("rnd: traffic reads=%0d writes=%0d", n_rd, n_wr));
    ck(n_done >= n_rd - 1, "rnd: every read answered");
    rd_req = 0; wr_valid = 0; mem_rvalid = 0;
  endtask

  initial begin
    rd_req = 0; wr_valid = 0; mem_ready = 0; mem_rvalid = 0;
    rd_addr = 32'h1000_0040; wr_addr = 32'h2000_0080; wr_data = {8{32'h5A5A_0000}};
    wr_bmask = 32'h0000_00F0; mem_rdata = {8{32'h1234_5678}};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // both want the bus, memory not ready
    rd_req = 1; wr_valid = 1;
    #1 ck(mem_req && !mem_we && mem_addr == rd_addr && !rd_gnt && !wr_pop, "read first, waits for ready");
    mem_ready = 1;
    #1 ck(rd_gnt && !wr_pop, "read granted");
    @(negedge clk); rd_req = 0;
    #1 ck(!mem_req && !wr_pop, "write blocked while read outstanding");
    @(negedge clk);
    #1 ck(!mem_req, "still blocked");
    mem_rvalid = 1;
    #1 ck(rd_done && rd_data == mem_rdata, "read data returned");
    @(negedge clk); mem_rvalid = 0;
    #1 ck(mem_req && mem_we && mem_addr == wr_addr && mem_wdata == wr_data &&
          mem_wmask == wr_bmask && wr_pop, "write goes when bus free");
    @(negedge clk); wr_valid = 0;
    #1 ck(!mem_req, "idle bus");

    random_phase(5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
