// Tag and data arrays of the heterogeneously tagged data cache.
//
// WAYS ways of SETS sets, each line LINE_BYTES wide. A tag entry is a
// packed word laid out, from the top bit down, as
//   valid | dirty | AC | V/P | PID | tag
// valid, dirty and the access-control (AC) bits are the line's status bits,
// V/P says whether the tag is virtual (0) or physical (1), and the PID
// extends virtual tags. The arrays are single-ported memories with a
// synchronous read: rd_en with rd_set reads the tag and data of every way
// of one set, and rd_tag/rd_data show them from the next cycle on until the
// next read. Writes address one way; data writes are byte-masked. After
// reset the arrays sweep all sets to clear the tag entries, one set per
// cycle, and hold init_busy high until done; other accesses must wait.
// The 32-byte line is this design's choice; size and associativity follow
// the evaluated configurations (32 KB, direct-mapped by default).
module cache_arrays #(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 1,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned TENT_W      = 26,   // tag entry width, set by the user
  localparam int unsigned SETS       = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned SET_W      = $clog2(SETS),
  localparam int unsigned WAY_W      = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned LINE_W     = LINE_BYTES * 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  output logic                              init_busy,
  // read port
  input  logic                              rd_en,
  input  logic [SET_W-1:0]                  rd_set,
  output logic [WAYS-1:0][TENT_W-1:0]       rd_tag,
  output logic [WAYS-1:0][LINE_W-1:0]       rd_data,
  // write port
  input  logic                              tag_we,
  input  logic                              data_we,
  input  logic [WAY_W-1:0]                  wr_way,
  input  logic [SET_W-1:0]                  wr_set,
  input  logic [TENT_W-1:0]                 wr_tag,
  input  logic [LINE_W-1:0]                 wr_data,
  input  logic [LINE_BYTES-1:0]             wr_bmask
);

  logic [SET_W-1:0] init_set;
  logic             init_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q   <= 1'b1;
      init_set <= '0;
    end else if (init_q) begin
      init_set <= init_set + 1'b1;
      if (init_set == SET_W'(SETS - 1)) init_q <= 1'b0;
    end
  end
  assign init_busy = init_q;

  for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
    logic [TENT_W-1:0] tag_mem  [SETS];
    logic [LINE_W-1:0] data_mem [SETS];

    logic             t_we;
    logic [SET_W-1:0] t_set;
    logic [TENT_W-1:0] t_din;

    always_comb begin
      t_we  = init_q || (tag_we && wr_way == WAY_W'(w));
      t_set = init_q ? init_set : wr_set;
      t_din = init_q ? '0 : wr_tag;
    end

    always_ff @(posedge clk) begin
      if (t_we) tag_mem[t_set] <= t_din;
      if (rd_en) rd_tag[w] <= tag_mem[rd_set];
    end

    always_ff @(posedge clk) begin
      if (data_we && wr_way == WAY_W'(w)) begin
        for (int b = 0; b < int'(LINE_BYTES); b++)
          if (wr_bmask[b]) data_mem[wr_set][b*8 +: 8] <= wr_data[b*8 +: 8];
      end
      if (rd_en) rd_data[w] <= data_mem[rd_set];
    end
  end

endmodule
