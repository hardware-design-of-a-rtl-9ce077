// m_lut -- parallelism look-up table (17 x 2 bits).
//
// Returns log2 of the number M of SISOs and extrinsic memories used for a
// block size: M = 1 for Nc <= 108, M = 2 for 120 <= Nc <= 480 and M = 4 for
// 960 <= Nc <= 2400. These powers of two make Nc/M a shift, keep Nc/M even
// and make the parallel interleaver collision free (Nc = 108 is the one size
// that collides with M = 2 or 4). The sliding-window length W of the size
// is returned too; W is this design's addition to the table (the published
// architecture holds only the 2-bit M here), used by the LIFO and by the
// SISO control. Combinational.
module m_lut
  import wimax_ctc_pkg::*;
(
  input  size_idx_t              size_idx,
  output logic [LOG2M_W-1:0]     log2m,     // M = 1 << log2m
  output win_t                   win_len    // window length W
);

  logic [LOG2M_W-1:0] rom_log2m [NUM_SIZES];
  win_t               rom_win   [NUM_SIZES];

  for (genvar s = 0; s < NUM_SIZES; s++) begin : g_rom
    localparam logic [LOG2M_W-1:0] LOG2M = LOG2M_W'(log2m_of(s));
    localparam win_t               WIN   = win_t'(w_of(s));
    assign rom_log2m[s] = LOG2M;
    assign rom_win[s]   = WIN;
  end

  always_comb begin
    int sel;
    sel     = (int'(size_idx) < NUM_SIZES) ? int'(size_idx) : NUM_SIZES - 1;
    log2m   = rom_log2m[sel];
    win_len = rom_win[sel];
  end

endmodule
