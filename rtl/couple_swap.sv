// couple_swap -- first step of the WiMax interleaver, applied on the fly.
//
// A couple stored at an odd natural address has its bits A and B exchanged
// in the interleaved order. For the LLR triplet this exchanges the LLRs of
// the symbols 01 and 10 and keeps the LLR of 11. 'swap' is the LSB of the
// natural address. The operation is its own inverse, so the same block
// serves the read and the write path. Taking the flag from the address
// LSB follows the published architecture; the triplet field order is this
// design's choice. Combinational.
module couple_swap
  import wimax_ctc_pkg::*;
(
  input  triplet_t  din,
  input  logic      swap,
  output triplet_t  dout
);

  always_comb begin
    dout = din;
    if (swap) begin
      dout.l01 = din.l10;
      dout.l10 = din.l01;
    end
  end

endmodule
