// Self-checking test of the cache arrays (1 KB, 2 ways, 32-byte lines):
// after the reset sweep every tag reads as zero; random tag writes, full
// line writes and byte-masked writes are compared with a reference model
// on synchronous reads of both ways, and read data holds while rd_en is
// low.
// The array organisation (synchronous read, reset sweep) is this design's
// own choice. A watchdog bounds the run.
module tb_cache_arrays;
  localparam int SETS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init_busy, rd_en, tag_we, data_we;
  logic [3:0] rd_set, wr_set;
  logic [1:0][25:0] rd_tag;
  logic [1:0][255:0] rd_data;
  logic [0:0] wr_way;
  logic [25:0] wr_tag;
  logic [255:0] wr_data;
  logic [31:0] wr_bmask;
  logic [25:0]  mt [2][SETS];
  logic [255:0] md [2][SETS];

  always #5 clk = ~clk;

  cache_arrays #(.CACHE_BYTES(1024), .WAYS(2), .LINE_BYTES(32), .TENT_W(26)) dut (.*);

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int s);
    @(negedge clk);
    rd_en = 1; rd_set = 4'(s);
    @(negedge clk);
    rd_en = 0; rd_set = 4'(s + 1);
    @(negedge clk);  // data must hold with rd_en low
    for (int w = 0; w < 2; w++) begin
      checks++;
      if (rd_tag[w] != mt[w][s]) begin failures++; $display("FAIL tag w%0d s%0d %h/%h", w, s, rd_tag[w], mt[w][s]); end
      if (md[w][s] !== 'x) begin
        checks++;
        if (rd_data[w] != md[w][s]) begin failures++; $display("FAIL data w%0d s%0d", w, s); end
      end
    end
  endtask

  initial begin
    rd_en = 0; tag_we = 0; data_we = 0; rd_set = 0; wr_set = 0; wr_way = 0;
    wr_tag = 0; wr_data = 0; wr_bmask = 0;
    for (int w = 0; w < 2; w++) for (int s = 0; s < SETS; s++) begin mt[w][s] = '0; md[w][s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!init_busy) begin failures++; $display("FAIL init_busy low too early"); end
    while (init_busy) @(negedge clk);
    // full-line data writes everywhere, then tags
    for (int w = 0; w < 2; w++) for (int s = 0; s < SETS; s++) begin
      @(negedge clk);
      data_we = 1; tag_we = 1; wr_way = 1'(w); wr_set = 4'(s);
      wr_data = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      wr_tag = 26'($urandom()); wr_bmask = '1;
      md[w][s] = wr_data; mt[w][s] = wr_tag;
    end
    @(negedge clk); data_we = 0; tag_we = 0;
    for (int s = 0; s < SETS; s++) read_check(s);
    // byte-masked writes
    for (int n = 0; n < 60; n++) begin
      int w, s;
      w = $urandom_range(0, 1); s = $urandom_range(0, SETS - 1);
      @(negedge clk);
      data_we = 1; tag_we = 0; wr_way = 1'(w); wr_set = 4'(s);
      wr_data = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      wr_bmask = $urandom();
      for (int b = 0; b < 32; b++) if (wr_bmask[b]) md[w][s][b*8 +: 8] = wr_data[b*8 +: 8];
      @(negedge clk); data_we = 0;
      read_check(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
