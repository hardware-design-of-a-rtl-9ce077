// address_generator -- parallel WiMax interleaver address generator.
//
// For one half iteration it produces, once per clock cycle for the time
// index j = 0 .. Nc/M-1, the address set used by all M SISOs at once: the
// common in-memory address adx_j, the memory idx_j^k of every SISO-k and
// the couple-swap flag. It is the serial interleaver (parameter LUT,
// accumulator and modulo units) followed by the block that splits Pi(j)
// into memory index and address, and by the modulo-M index generators.
// In an in-order half iteration the same timing is used with adx = j,
// idx^k = k and no swap.
//
// The swap flag is the LSB of Pi(j); since Nc/M is even it equals LSB of
// adx_j and is the same for every SISO.
//
// The structure is the published one; the output register, the latency
// and the in-order mode are this design's choices.
//
// Interface: a one-cycle 'start' (ignored while busy) latches the block-size
// index and the mode. The first address set appears on the registered
// outputs two cycles after 'start' with 'valid' high; one set follows per
// cycle, the last one flagged by 'last'. 'busy' is high from the cycle
// after 'start' until the last set has been computed. The configuration
// outputs (nc, log2m, len, win_len) hold the latched block size.
module address_generator
  import wimax_ctc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  size_idx_t            size_idx,
  input  logic                 scrambled,   // 1: interleaved, 0: in order
  output logic                 busy,
  output logic                 valid,       // address set valid
  output logic                 last,        // last set of the half iteration
  output adx_t                 adx,         // address in every memory
  output idx_t [MMAX-1:0]      idx,         // memory of SISO-k
  output logic [MMAX-1:0]      active,      // SISO-k in use
  output logic                 swap,        // exchange A and B of the couple
  output nc_t                  nc,
  output logic [LOG2M_W-1:0]   log2m,
  output nc_t                  len,         // Nc / M
  output win_t                 win_len      // window length W
);

  size_idx_t cfg_size;
  logic      cfg_scr;

  p0_t             p0;
  nc_t [3:1]       kmod;
  nc_t             j;
  nc_t             pi;
  adx_t            x_adx;
  idx_t            x_idx0;
  idx_t [MMAX-1:0] x_idx;
  logic [MMAX-1:0] x_active;
  logic            step_last;

  param_lut u_param_lut (
    .size_idx (cfg_size),
    .nc       (nc),
    .p0       (p0),
    .kmod     (kmod)
  );

  m_lut u_m_lut (
    .size_idx (cfg_size),
    .log2m    (log2m),
    .win_len  (win_len)
  );

  assign len = nc >> log2m;

  serial_interleaver u_serial (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (start && !busy),
    .step  (busy),
    .nc    (nc),
    .p0    (p0),
    .kmod  (kmod),
    .j     (j),
    .pi    (pi)
  );

  adx_extract u_adx_extract (
    .pi    (pi),
    .l     (len),
    .log2m (log2m),
    .adx   (x_adx),
    .idx0  (x_idx0)
  );

  idx_gen u_idx_gen (
    .idx0   (x_idx0),
    .log2m  (log2m),
    .p0     (p0),
    .idx    (x_idx),
    .active (x_active)
  );

  assign step_last = busy && (j == len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_size <= '0;
      cfg_scr  <= 1'b0;
      busy     <= 1'b0;
      valid    <= 1'b0;
      last     <= 1'b0;
      adx      <= '0;
      idx      <= '0;
      active   <= '0;
      swap     <= 1'b0;
    end else begin
      if (start && !busy) begin
        cfg_size <= size_idx;
        cfg_scr  <= scrambled;
        busy     <= 1'b1;
      end else if (step_last) begin
        busy     <= 1'b0;
      end
      valid  <= busy;
      last   <= step_last;
      active <= x_active;
      if (cfg_scr) begin
        adx  <= x_adx;
        idx  <= x_idx;
        swap <= x_adx[0];
      end else begin
        adx  <= adx_t'(j);
        for (int k = 0; k < MMAX; k++) idx[k] <= idx_t'(k);
        swap <= 1'b0;
      end
    end
  end

endmodule
