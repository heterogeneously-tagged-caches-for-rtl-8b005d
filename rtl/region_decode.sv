// Shared-region identification.
//
// Interprocess shared buffers are mapped by the OS into the upper quarter
// of the virtual address space (VA[31:30] = 2'b11), so a single AND of the
// two top address bits tells a shared reference from a private one. Within
// that quarter the third bit chooses the translation: VA[29] = 1 is the
// half whose regions are aligned and translated by the synonym offset
// table (SOT) and its adders, VA[29] = 0 is the half translated by the
// TLB and aligned in physical memory by the OS. The bits directly below
// VA[29] index the SOT (VA[28:26] for 8 rows); that choice of bits is this
// design's own.
//
// Purely combinational; no clock.
module region_decode
  import htag_pkg::*;
#(
  parameter int unsigned SOT_ENTRIES = 8
) (
  input  va_t                              va,
  output region_e                          region,
  output logic [$clog2(SOT_ENTRIES)-1:0]   sot_idx
);

  localparam int unsigned IDX_W = $clog2(SOT_ENTRIES);

  logic shared;
  assign shared  = va[VA_W-1] & va[VA_W-2];
  assign sot_idx = va[VA_W-4 -: IDX_W];

  always_comb begin
    if (!shared)             region = REG_PRIVATE;
    else if (va[VA_W-3])     region = REG_SHARED_SOT;
    else                     region = REG_SHARED_TLB;
  end

endmodule
