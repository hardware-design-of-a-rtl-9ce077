// serial_interleaver -- one WiMax interleaved address per clock cycle.
//
// Computes Pi(j) = {[(P0*j) mod Nc] + (K_j mod Nc)} mod Nc, the form of the
// WiMax law in which both additions stay in [0, 2Nc-1] so that each modulo
// is a single subtract-and-select (mod_sub):
//   * an accumulator holds (P0*j) mod Nc; each step adds P0 and reduces,
//   * the two LSBs of the time counter j select K_j mod Nc (K_0 = 1),
//   * the sum is reduced once more to give Pi(j).
// This is the published accumulator structure; the interface and the
// combinational output are this design's choice.
// Interface: 'clear' restarts at j = 0 (accumulator 0), 'step' advances j
// by one. Pi(j) and j are combinational outputs of the current state, valid
// in the cycle after clear/step. The configuration inputs must be stable
// while stepping. P0 < Nc is assumed, as holds for every WiMax size.
module serial_interleaver
  import wimax_ctc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,      // j <= 0
  input  logic        step,       // j <= j + 1
  input  nc_t         nc,
  input  p0_t         p0,
  input  nc_t [3:1]   kmod,       // K_q mod Nc, q = 1..3
  output nc_t         j,          // time index (j-cnt)
  output nc_t         pi          // Pi(j)
);

  nc_t acc;          // (P0*j) mod Nc
  nc_t acc_next;
  nc_t k_sel;

  mod_sub #(.W(NC_W)) u_acc_mod (
    .x ({1'b0, acc} + {{(NC_W-P0_W+1){1'b0}}, p0}),
    .n (nc),
    .y (acc_next)
  );

  always_comb begin
    unique case (j[1:0])
      2'd0: k_sel = nc_t'(1);
      2'd1: k_sel = kmod[1];
      2'd2: k_sel = kmod[2];
      default: k_sel = kmod[3];
    endcase
  end

  mod_sub #(.W(NC_W)) u_out_mod (
    .x ({1'b0, acc} + {1'b0, k_sel}),
    .n (nc),
    .y (pi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      j   <= '0;
    end else if (clear) begin
      acc <= '0;
      j   <= '0;
    end else if (step) begin
      acc <= acc_next;
      j   <= j + 1'b1;
    end
  end

endmodule
