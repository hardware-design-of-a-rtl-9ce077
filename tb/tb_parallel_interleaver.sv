// tb_parallel_interleaver -- end-to-end test of the parallel interleaver
// and its extrinsic memories at full size, for all 17 WiMax block sizes.
//
// A behavioural model of the M SISOs sits on the read and write ports. It
// keeps every read window and, as soon as the window is complete, writes
// the results back newest first, one per cycle, while the next window is
// being read (the two-bank LIFO allows no more slack than that). For each block size three half iterations run:
//   1. in order:  memory contents are unknown; SISO-k writes tag(k*L+j)
//      at time j, so every natural couple gets a known triplet;
//   2. scrambled: SISO-k at time j must receive the couple of natural
//      position Pi(j+k*L), A/B-swapped when that position is odd; it
//      writes back a modified triplet f(x);
//   3. in order:  SISO-k at time j must receive swap(f(swap(tag))) of
//      natural position k*L+j, proving the write path went through the
//      LIFO, the wdata-switch and the swap to the right place.
// Also checked: Nc/M read beats per half iteration, one per cycle, the
// first three cycles after 'start', and that no LIFO error occurs. At the
// end the SISOs stop writing for a 2400-couple frame, which must raise
// 'lifo_overflow'. The mechanisms exercised are counted and each must
// occur at least once.
module tb_parallel_interleaver;
  import wimax_ctc_pkg::*;
  import wimax_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, scrambled = 0;
  size_idx_t size_idx = '0;
  logic busy, siso_rvalid, siso_rlast, wr_ready, siso_wvalid = 0, lifo_overflow, lifo_underflow;
  logic [MMAX-1:0] cfg_active;
  nc_t cfg_len;
  win_t cfg_win;
  triplet_t [MMAX-1:0] siso_rdata, siso_wdata;

  parallel_interleaver dut (
    .clk(clk), .rst_n(rst_n), .start(start), .size_idx(size_idx), .scrambled(scrambled),
    .busy(busy), .cfg_active(cfg_active), .cfg_len(cfg_len), .cfg_win(cfg_win),
    .siso_rvalid(siso_rvalid), .siso_rlast(siso_rlast), .siso_rdata(siso_rdata), .wr_ready(wr_ready),
    .siso_wvalid(siso_wvalid), .siso_wdata(siso_wdata),
    .lifo_overflow(lifo_overflow), .lifo_underflow(lifo_underflow));

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_m1 = 0, n_m2 = 0, n_m4 = 0;       // half iterations per parallelism
  int n_inorder = 0, n_scr = 0;           // mode switch
  int n_rd_swap = 0, n_wr_swap = 0;       // couple swaps on read and write
  int n_overlap = 0;                      // write of a window while reading the next
  int n_acc_wrap = 0;                     // accumulator modulo correction
  int n_idx_plus = 0, n_idx_minus = 0;    // idx^k = idx0 + k / idx0 - k
  int n_shared = 0;                       // LIFO bank pushed as it is emptied
  int n_ovf = 0;

  // SISO model state
  logic [23:0] wbuf [2400][4];            // results, by time j and SISO k
  int cur_s, cur_m, cur_l, cur_w, phase;  // phase 0, 1, 2 as above
  int rj;                                 // read beats received
  int wj_done;                            // result sets written
  int wwin, we;                           // window being written, entry
  bit writing;
  bit quiet;                              // SISOs stop writing

  function automatic logic [23:0] f_siso(logic [23:0] x);
    return {x[23:16] + 8'd1, x[15:8] + 8'd2, x[7:0] + 8'd3};
  endfunction

  function automatic logic [23:0] expect_rd(int s, int ph, int k, int j, int l);
    int p;
    case (ph)
      1: begin
        p = ref_pi(s, j + k * l);
        return swap_ab(tag(p, 0), bit'(p % 2));
      end
      default: begin
        p = k * l + j;
        return swap_ab(f_siso(swap_ab(tag(p, 0), bit'(p % 2))), bit'(p % 2));
      end
    endcase
  endfunction

  // Read side of the SISO model: check and store.
  always @(posedge clk) begin
    if (rst_n && siso_rvalid) begin
      for (int k = 0; k < MMAX; k++) begin
        logic [23:0] w;
        if (k < cur_m) begin
          if (phase != 0) begin
            checks++;
            if (siso_rdata[k] != expect_rd(cur_s, phase, k, rj, cur_l)) begin
              failures++;
              if (failures < 10)
                $display("FAIL Nc=%0d phase %0d k=%0d j=%0d got %h exp %h", ref_nc(cur_s), phase,
                         k, rj, siso_rdata[k], expect_rd(cur_s, phase, k, rj, cur_l));
            end
          end
          w = (phase == 0) ? tag(k * cur_l + rj, 0) : f_siso(siso_rdata[k]);
        end else begin
          w = 24'($urandom);
        end
        wbuf[rj][k] = w;
      end
      rj++;
    end
  end

  // Write side of the SISO model: whole windows, newest first.
  always @(negedge clk) begin
    if (!rst_n) begin
      siso_wvalid <= 1'b0;
    end else begin
      bit win_read, go;
      win_read = (rj >= (wwin + 1) * cur_w) && (wwin * cur_w < cur_l);
      if (!writing && win_read && !quiet) begin
        writing = 1;
        we = cur_w - 1;
      end
      go = writing;
      siso_wvalid = go;
      if (go) begin
        int j;
        j = wwin * cur_w + we;
        for (int k = 0; k < MMAX; k++) siso_wdata[k] = wbuf[j][k];
        checks++;
        if (!wr_ready) begin
          failures++;
          $display("FAIL wr_ready low while a window is complete t=%0t rj=%0d wwin=%0d we=%0d w=%0d l=%0d ph=%0d", $time, rj, wwin, we, cur_w, cur_l, phase);
        end
        if (siso_rvalid) n_overlap++;
        if (dut.wswap) n_wr_swap++;
        wj_done++;
        if (we == 0) begin
          writing = 0;
          wwin++;
        end else begin
          we--;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_addr_gen.busy && dut.u_addr_gen.u_serial.acc_next != 12'(dut.u_addr_gen.u_serial.acc + 12'(dut.u_addr_gen.p0)))
        n_acc_wrap++;
      if (siso_rvalid && dut.r_swap) n_rd_swap++;
      if (lifo_overflow) n_ovf++;
      if (dut.u_lifo.pop_end && dut.u_lifo.do_push && dut.u_lifo.rbank == dut.u_lifo.wbank) n_shared++;
      if (lifo_underflow) begin
        failures++;
        $display("FAIL LIFO underflow");
      end
    end
  end

  task automatic half_iteration(int s, int ph);
    int lat, beats, first, last;
    bit scr;
    scr = (ph == 1);
    cur_s = s; cur_m = ref_m(s); cur_l = ref_nc(s) / cur_m; cur_w = ref_w(s);
    phase = ph; rj = 0; wj_done = 0; wwin = 0; writing = 0;
    @(negedge clk);
    size_idx = size_idx_t'(s); scrambled = scr; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1; beats = 0; first = -1; last = -1;
    while (busy) begin
      if (siso_rvalid) begin
        if (first < 0) begin
          first = lat;
          // configuration seen by the SISO control
          checks++;
          if (int'(cfg_len) != cur_l || int'(cfg_win) != cur_w ||
              cfg_active != MMAX'((1 << cur_m) - 1)) begin
            failures++;
            $display("FAIL config Nc=%0d: len=%0d win=%0d active=%b", ref_nc(s), cfg_len, cfg_win, cfg_active);
          end
        end
        last = lat;
        beats++;
        checks++;
        if (siso_rlast != (beats == cur_l)) failures++;
      end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (beats != cur_l || first != 3 || last - first + 1 != cur_l || wj_done != cur_l / cur_w * cur_w) begin
      failures++;
      $display("FAIL Nc=%0d phase %0d: %0d beats from cycle %0d to %0d, %0d written",
               ref_nc(s), ph, beats, first, last, wj_done);
    end
    if (cur_m == 1) n_m1++; else if (cur_m == 2) n_m2++; else n_m4++;
    if (scr) begin
      n_scr++;
      if (cur_m == 4 && TAB[s][1] % 4 == 3) n_idx_minus++;
      if (cur_m == 4 && TAB[s][1] % 4 == 1) n_idx_plus++;
    end else n_inorder++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    quiet = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSIZES; s++) begin
      half_iteration(s, 0);
      half_iteration(s, 1);
      half_iteration(s, 2);
    end
    // SISOs that never write back: the LIFO must report the overflow
    quiet = 1;
    cur_s = NSIZES - 1; cur_m = 4; cur_l = 600; cur_w = 40; phase = 0; rj = 0; wwin = 0;
    @(negedge clk);
    size_idx = size_idx_t'(NSIZES - 1); scrambled = 0; start = 1;
    @(negedge clk);
    start = 0;
    repeat (700) @(negedge clk);
    checks++;
    if (n_ovf == 0 || !busy) begin
      failures++;
      $display("FAIL no overflow reported");
    end
    $display("mechanisms:");
    need("parallelism M=1", n_m1);
    need("parallelism M=2", n_m2);
    need("parallelism M=4", n_m4);
    need("in-order half iterations", n_inorder);
    need("scrambled half iterations", n_scr);
    need("couple swaps on read", n_rd_swap);
    need("couple swaps on write", n_wr_swap);
    need("write-back during next window read", n_overlap);
    need("accumulator modulo corrections", n_acc_wrap);
    need("idx^k = idx0 + k (M=4)", n_idx_plus);
    need("idx^k = idx0 - k (M=4)", n_idx_minus);
    need("LIFO bank refilled as it empties", n_shared);
    need("LIFO overflow reports", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
