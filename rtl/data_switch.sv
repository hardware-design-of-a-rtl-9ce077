// data_switch -- 4x4 crossbar for LLR triplets (rdata-switch / wdata-switch).
//
// Input i is sent to output sel[i] when en[i] is set: out[sel[i]] = in[i].
// The read path uses it with in = memory outputs and sel = radx-switch
// outputs (memory m to SISO radx[m]); the write path with in = SISO outputs
// and sel = idx^k from the LIFO (SISO-k to memory idx^k). 'oen[o]' says
// that output o received data. The selectors must form a partial
// permutation, which the collision-free interleaver guarantees. Both uses
// and the 24-bit width (three 8-bit LLRs) follow the published
// architecture; 'oen' is this design's addition.
// Combinational; N ports of DW bits.
module data_switch #(
  parameter int N  = 4,
  parameter int DW = 24
) (
  input  logic [N-1:0][DW-1:0]        din,
  input  logic [N-1:0][$clog2(N)-1:0] sel,
  input  logic [N-1:0]                en,
  output logic [N-1:0][DW-1:0]        dout,
  output logic [N-1:0]                oen
);

  always_comb begin
    dout = '0;
    oen  = '0;
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++)
        if (en[i] && int'(sel[i]) == o) begin
          dout[o] = din[i];
          oen[o]  = 1'b1;
        end
  end

endmodule
