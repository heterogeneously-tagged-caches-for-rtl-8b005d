// Offset adder of the shared-region translation path.
//
// Shared buffers are placed at consecutive virtual and consecutive physical
// pages, so a physical field is the virtual field plus a constant offset
// held in the synonym offset table. The cache uses two instances: a narrow
// one (the superset width) that turns the virtual superset bits into the
// physical ones on the cache indexing path, and a 20-bit one that turns the
// VPN into the PPN in place of a TLB lookup. The sum wraps modulo 2^W.
//
// Purely combinational.
module offset_adder #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,    // virtual superset bits or VPN
  input  logic [W-1:0] b,    // offset from the SOT
  output logic [W-1:0] sum   // physical superset bits or PPN
);

  assign sum = a + b;

endmodule
