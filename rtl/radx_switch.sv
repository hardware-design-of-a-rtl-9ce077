// radx_switch -- 4x4 crossbar that tells each memory which SISO reads it.
//
// Input k carries the fixed 2-bit value k (the SISO number) and is routed
// to output idx[k]. Output m therefore holds the SISO that accesses memory
// m, and 'hit[m]' says whether any active SISO does in a cycle where
// 'valid' marks the address set as real. Because the
// interleaver is collision free, at most one SISO targets each memory; the
// assertion checks this. Its output steers the read-data crossbar. The
// crossbar with fixed 2-bit inputs is the published structure; the
// 'valid' input and the 'hit' outputs are this design's additions.
// Combinational.
module radx_switch
  import wimax_ctc_pkg::*;
(
  input  logic              valid,     // address set valid this cycle
  input  idx_t [MMAX-1:0]   idx,       // memory accessed by SISO-k
  input  logic [MMAX-1:0]   active,    // SISO-k in use
  output idx_t [MMAX-1:0]   radx,      // SISO reading memory m
  output logic [MMAX-1:0]   hit        // memory m accessed
);

  always_comb begin
    radx = '0;
    hit  = '0;
    for (int m = 0; m < MMAX; m++)
      for (int k = 0; k < MMAX; k++)
        if (valid && active[k] && idx[k] == idx_t'(m)) begin
          radx[m] = idx_t'(k);
          hit[m]  = 1'b1;
        end
  end

  // Collision-free rule: no two active SISOs address the same memory.
  always_comb begin
    for (int a = 0; a < MMAX; a++)
      for (int b = a + 1; b < MMAX; b++)
        assert (!(valid && active[a] && active[b] && idx[a] == idx[b]))
          else $error("radx_switch: SISOs %0d and %0d collide on memory %0d", a, b, idx[a]);
  end

endmodule
