// param_lut -- block-size look-up table of the serial WiMax interleaver.
//
// For the selected block size it returns Nc, the step P0 and the three
// offsets K_q mod Nc (q = 1..3) that the address generator adds to
// (P0*j) mod Nc; K_0 mod Nc is always 1 and is not stored. Keeping P0 and
// the K_j mod Nc terms in one small combinational LUT follows the published
// architecture (17 x 37 bits there). The field widths, the extra Nc output
// and the 5-bit size index as the only input are this design's choice; the
// entries are computed at elaboration from the standard's P0..P3 (see
// wimax_ctc_pkg).
// Purely combinational, no clock. An index above 16 selects Nc = 2400.
module param_lut
  import wimax_ctc_pkg::*;
(
  input  size_idx_t         size_idx,   // 0..16 -> Nc = 24 .. 2400
  output nc_t               nc,         // number of couples
  output p0_t               p0,         // interleaver step P0
  output nc_t [3:1]         kmod        // K_q mod Nc, q = 1..3
);

  // ROM contents, evaluated at elaboration.
  nc_t       rom_nc   [NUM_SIZES];
  p0_t       rom_p0   [NUM_SIZES];
  nc_t [3:1] rom_kmod [NUM_SIZES];

  for (genvar s = 0; s < NUM_SIZES; s++) begin : g_rom
    localparam nc_t NC = nc_t'(nc_of(s));
    localparam p0_t P0 = p0_t'(p_of(s, 0));
    localparam nc_t K1 = nc_t'(kmod_of(s, 1));
    localparam nc_t K2 = nc_t'(kmod_of(s, 2));
    localparam nc_t K3 = nc_t'(kmod_of(s, 3));
    assign rom_nc[s]   = NC;
    assign rom_p0[s]   = P0;
    assign rom_kmod[s] = {K3, K2, K1};
  end

  always_comb begin
    int sel;
    sel  = (int'(size_idx) < NUM_SIZES) ? int'(size_idx) : NUM_SIZES - 1;
    nc   = rom_nc[sel];
    p0   = rom_p0[sel];
    kmod = rom_kmod[sel];
  end

endmodule
