// idx_gen -- memory index of every SISO in a scrambled half iteration.
//
// Because the WiMax interleaver at the chosen M is circular shifting,
// Pi(j + k*L) = Pi(j) +/- k*L (mod Nc): SISO-k reads memory
// idx_k = (idx0 +/- k) mod M at the same address as SISO-0. M is a power of
// two, so the modulo is a mask of the low log2(M) bits; the M-1 non-trivial
// indices come from modulo-M adders or subtracters. The sign is '-' when
// P0 mod M = M-1 and '+' when P0 mod M = 1 (the two cases coincide for
// M <= 2); deriving the sign from P0 in this way is this design's own
// choice, the modulo-M adders/subtracters are the published structure.
// SISOs k >= M are inactive for the block size: their index is
// forced to k and their 'active' bit is 0. Combinational.
module idx_gen
  import wimax_ctc_pkg::*;
(
  input  idx_t                 idx0,      // memory read by SISO-0
  input  logic [LOG2M_W-1:0]   log2m,     // M = 1 << log2m
  input  p0_t                  p0,        // selects the direction
  output idx_t [MMAX-1:0]      idx,       // memory read by SISO-k
  output logic [MMAX-1:0]      active     // SISO-k in use (k < M)
);

  logic minus;
  idx_t mask;

  always_comb begin
    mask  = idx_t'((1 << log2m) - 1);
    minus = (log2m > 1) && ((idx_t'(p0) & mask) == mask);
    for (int k = 0; k < MMAX; k++) begin
      active[k] = (k < (1 << log2m));
      if (!active[k])
        idx[k] = idx_t'(k);
      else if (minus)
        idx[k] = (idx0 - idx_t'(k)) & mask;
      else
        idx[k] = (idx0 + idx_t'(k)) & mask;
    end
  end

endmodule
