// Benchmark-mix testbench: replays the access mix of seven media benchmarks
// (adpcm, g721, gsm, epic, jpeg, mpeg, mp3) on every cache organisation
// the evaluation covers, and counts how many TLB lookups the heterogeneous
// tags leave, against one lookup per access for a physically tagged cache.
//
// Twenty-four configurations run side by side, each its own DUT:
//   - sizes: 32 KB direct-mapped or 4-way with a 32-entry TLB, and 16 KB
//     direct-mapped or 4-way with a 64-entry TLB
//   - write policies: write-back, write-through, write-through with the
//     physical page latch
//   - shared buffers translated by the SOT adders, or through the TLB on
//     OS-coloured pages
// Each program checks every load against a reference memory, and checks
// how shared buffers were translated (tb_htag_wl_prog). The absolute
// numbers depend on this bench's synthetic locality, not on the real
// programs. They show the trends: fewer lookups with more shared accesses
// in SOT mode, fewer with write-back than write-through, and fewer with
// the latch than without.
module tb_htag_workload;
  localparam int NCFG = 24;
  localparam int SZ_BYTES [4] = '{32768, 32768, 16384, 16384};
  localparam int SZ_WAYS  [4] = '{1, 4, 1, 4};
  localparam int SZ_TLB   [4] = '{32, 32, 64, 64};

  logic done     [NCFG];
  int   checks   [NCFG];
  int   failures [NCFG];

  for (genvar z = 0; z < 4; z++) begin : g_size
    for (genvar p = 0; p < 3; p++) begin : g_policy
      for (genvar m = 0; m < 2; m++) begin : g_shared
        tb_htag_wl_unit #(
          .CACHE_BYTES   (SZ_BYTES[z]),
          .WAYS          (SZ_WAYS[z]),
          .TLB_ENTRIES   (SZ_TLB[z]),
          .WRITE_THROUGH (p != 0),
          .USE_PPL       (p == 2),
          .SHARED_TLB    (m == 1)
        ) u (
          .done     (done[z * 6 + p * 2 + m]),
          .checks   (checks[z * 6 + p * 2 + m]),
          .failures (failures[z * 6 + p * 2 + m])
        );
      end
    end
  end

  initial begin
    int n, c, f;
    logic all;
    n = 0;
    #1;  // the programs clear done at time 0
    forever begin
      all = 1'b1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
      if (all || n >= 2000000) break;
      #10;
      n++;
    end
    c = 0; f = 0;
    for (int i = 0; i < NCFG; i++) begin c += checks[i]; f += failures[i]; end
    if (!all) begin
      $display("watchdog expired");
      f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
