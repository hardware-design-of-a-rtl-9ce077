// ei_mem -- one extrinsic-information memory (EI-MEM) of the parallel
// decoder: DEPTH words of one LLR triplet each.
//
// Memory m holds the couples m*L .. (m+1)*L-1 of the frame (L = Nc/M) at
// addresses 0 .. L-1. One synchronous read port and one write port, so a
// SISO can read the next window while the previous window is written back.
// Read data appear the cycle after 're' and hold otherwise; a read and a
// write of the same address in one cycle return the old word. Four of
// these of 600 x 24 bits make the 57.6 kbit the decoder needs. The total
// size is the published one; the port structure and the read-before-write
// behaviour are this design's choice. Written as an array so that
// synthesis can map it to an SRAM.
module ei_mem #(
  parameter int DEPTH = 600,
  parameter int DW    = 24,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           re,
  input  logic [AW-1:0]  raddr,
  output logic [DW-1:0]  rdata,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [DW-1:0]  wdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re)
      rdata <= mem[raddr];
    if (we)
      mem[waddr] <= wdata;
  end

endmodule
