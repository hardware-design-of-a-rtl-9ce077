// parallel_interleaver -- collision-free parallel interleaver and
// extrinsic-information memory system of a WiMax duo-binary turbo decoder
// with up to four SISOs.
//
// The address generator gives, every cycle, one common address adx_j and
// the memory idx_j^k of each SISO-k. The read side:
//   * radx-switch: routes the fixed SISO number k to output idx_j^k, so
//     that each memory knows which SISO it serves;
//   * EI-MEM 0..3: all read at adx_j (one synchronous read port each);
//   * rdata-switch: sends memory m's triplet to SISO radx[m];
//   * couple swap: exchanges the A/B LLRs when the natural address is odd.
// Each address set is also pushed into the window LIFO. The SISOs return
// a window's results in reverse order: every write beat pops one set, the
// triplets are swapped back and the wdata-switch sends SISO-k's triplet to
// memory idx^k at address adx.
//
// The block structure (switches, LIFO, memories, swap) is the published
// one; the handshake with the SISOs, the latencies, the status outputs and
// running in-order half iterations through the same datapath are this
// design's own.
//
// Operation: pulse 'start' with the block-size index (0..16) and the mode
// ('scrambled' = 1 for the interleaved half iteration, 0 for the in-order
// one). Read data for time j = 0 .. Nc/M-1 appear on siso_rdata with
// siso_rvalid, one set per cycle, starting three cycles after 'start';
// siso_rlast marks the last one.
// The SISOs (outside this block) must raise siso_wvalid once per result,
// window by window in reverse order, only after the whole window has been
// read ('wr_ready' high); 'busy' falls when every read address set has
// been written back. 'cfg_active', 'cfg_len' and 'cfg_win' tell the SISO
// control how many SISOs run, Nc/M and the window length W. LIFO misuse is
// reported on 'lifo_overflow' / 'lifo_underflow'.
module parallel_interleaver
  import wimax_ctc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // control
  input  logic                   start,
  input  size_idx_t              size_idx,
  input  logic                   scrambled,
  output logic                   busy,
  // configuration for the SISO control units
  output logic [MMAX-1:0]        cfg_active,
  output nc_t                    cfg_len,
  output win_t                   cfg_win,
  // read data to the SISOs
  output logic                   siso_rvalid,
  output logic                   siso_rlast,    // last read beat
  output triplet_t [MMAX-1:0]    siso_rdata,
  // write data from the SISOs
  output logic                   wr_ready,
  input  logic                   siso_wvalid,
  input  triplet_t [MMAX-1:0]    siso_wdata,
  // status
  output logic                   lifo_overflow,
  output logic                   lifo_underflow
);

  // ---------------------------------------------------------------- address
  logic              ag_busy, ag_valid, ag_last, ag_swap;
  adx_t              ag_adx;
  idx_t [MMAX-1:0]   ag_idx;
  logic [MMAX-1:0]   ag_active;
  logic              mode_scr;

  address_generator u_addr_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .size_idx  (size_idx),
    .scrambled (scrambled),
    .busy      (ag_busy),
    .valid     (ag_valid),
    .last      (ag_last),
    .adx       (ag_adx),
    .idx       (ag_idx),
    .active    (ag_active),
    .swap      (ag_swap),
    .nc        (),
    .log2m     (),
    .len       (cfg_len),
    .win_len   (cfg_win)
  );

  assign cfg_active = ag_active;

  // ------------------------------------------------------------- read side
  idx_t [MMAX-1:0]          radx;
  logic [MMAX-1:0]          radx_hit;
  idx_t [MMAX-1:0]          r_radx;
  logic [MMAX-1:0]          r_hit;
  logic                     r_valid, r_last, r_swap;
  triplet_t [MMAX-1:0]      mem_rdata;
  triplet_t [MMAX-1:0]      rsw_out;

  radx_switch u_radx_switch (
    .valid  (ag_valid),
    .idx    (ag_idx),
    .active (ag_active),
    .radx   (radx),
    .hit    (radx_hit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_last  <= 1'b0;
      r_swap  <= 1'b0;
      r_radx  <= '0;
      r_hit   <= '0;
    end else begin
      r_valid <= ag_valid;
      r_last  <= ag_last;
      r_swap  <= ag_swap;
      r_radx  <= radx;
      r_hit   <= radx_hit;
    end
  end

  data_switch #(.N(MMAX), .DW(TRIPLET_W)) u_rdata_switch (
    .din  (mem_rdata),
    .sel  (r_radx),
    .en   (r_hit),
    .dout (rsw_out),
    .oen  ()
  );

  for (genvar k = 0; k < MMAX; k++) begin : g_rswap
    couple_swap u_swap (
      .din  (rsw_out[k]),
      .swap (r_swap),
      .dout (siso_rdata[k])
    );
  end

  assign siso_rvalid = r_valid;
  assign siso_rlast  = r_last;

  // ------------------------------------------------------------------ LIFO
  lifo_entry_t  push_entry, pop_entry;
  logic         lifo_ready;
  nc_t          pending;            // address sets read but not written

  assign push_entry.adx = ag_adx;
  assign push_entry.idx = ag_idx;

  window_lifo #(.DEPTH(W_MAX), .DW($bits(lifo_entry_t))) u_lifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (start && !busy),
    .win_len   (cfg_win),
    .push      (ag_valid),
    .push_data (push_entry),
    .pop       (siso_wvalid),
    .pop_data  (pop_entry),
    .ready     (lifo_ready),
    .overflow  (lifo_overflow),
    .underflow (lifo_underflow)
  );

  assign wr_ready = lifo_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      mode_scr <= 1'b0;
    end else begin
      if (start && !busy)
        mode_scr <= scrambled;
      pending <= pending + nc_t'(ag_valid && !lifo_overflow)
                         - nc_t'(siso_wvalid && lifo_ready);
    end
  end

  assign busy = ag_busy || ag_valid || r_valid || (pending != '0);

  // ------------------------------------------------------------ write side
  triplet_t [MMAX-1:0] wswapped;
  triplet_t [MMAX-1:0] mem_wdata;
  logic [MMAX-1:0]     mem_we;
  logic                wswap;

  assign wswap = mode_scr && pop_entry.adx[0];

  for (genvar k = 0; k < MMAX; k++) begin : g_wswap
    couple_swap u_swap (
      .din  (siso_wdata[k]),
      .swap (wswap),
      .dout (wswapped[k])
    );
  end

  data_switch #(.N(MMAX), .DW(TRIPLET_W)) u_wdata_switch (
    .din  (wswapped),
    .sel  (pop_entry.idx),
    .en   (ag_active & {MMAX{siso_wvalid && lifo_ready}}),
    .dout (mem_wdata),
    .oen  (mem_we)
  );

  // --------------------------------------------------------------- EI-MEM
  for (genvar m = 0; m < MMAX; m++) begin : g_mem
    ei_mem #(.DEPTH(MEM_DEPTH), .DW(TRIPLET_W)) u_ei_mem (
      .clk   (clk),
      .re    (radx_hit[m]),
      .raddr (ag_adx),
      .rdata (mem_rdata[m]),
      .we    (mem_we[m]),
      .waddr (pop_entry.adx),
      .wdata (mem_wdata[m])
    );
  end

endmodule
