// adx_extract -- splits an interleaved address into memory index and
// in-memory address.
//
// With L = Nc/M couples per memory, natural position Pi lives in memory
// idx0 = floor(Pi / L) at address adx = Pi mod L. The block evaluates the
// M-1 differences Pi - i*L (i = 1..M-1) in parallel; the signs of these
// subtractions form a thermometer code whose population count is idx0,
// and idx0 selects the matching difference (or Pi itself) as adx. The
// multiples i*L are shifts and adds of L only, never a multiplier. Unused
// differences (i >= M) are masked. Selecting adx and idx0 from the signs of
// the subtractions follows the published architecture; the thermometer
// count is this design's way of doing it. Combinational.
module adx_extract
  import wimax_ctc_pkg::*;
(
  input  nc_t                  pi,      // Pi(j), 0 <= Pi < Nc
  input  nc_t                  l,       // L = Nc / M
  input  logic [LOG2M_W-1:0]   log2m,   // M = 1 << log2m
  output adx_t                 adx,     // Pi mod L
  output idx_t                 idx0     // Pi div L
);

  localparam int DW = NC_W + 3;         // room for 3L and a sign bit

  logic signed [DW-1:0] diff [MMAX];
  logic [MMAX-1:0]      ge;             // Pi >= i*L, thermometer code

  always_comb begin
    logic [DW-1:0] mult;
    mult    = '0;
    diff[0] = signed'(DW'(pi));
    ge      = '0;
    ge[0]   = 1'b1;
    for (int i = 1; i < MMAX; i++) begin
      mult    = mult + DW'(l);                    // i*L by repeated addition
      diff[i] = signed'(DW'(pi) - mult);
      ge[i]   = !diff[i][DW-1] && (i < (1 << log2m));
    end
    idx0 = '0;
    for (int i = 1; i < MMAX; i++)
      if (ge[i]) idx0 = idx_t'(i);
    adx = adx_t'(diff[idx0]);
  end

endmodule
