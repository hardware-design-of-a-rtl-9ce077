// tb_wimax_throughput -- decoder-throughput workload for the 17 WiMax
// frame sizes.
//
// For each size one scrambled half iteration is run through the full-size
// interleaver with a SISO stand-in that writes every window back as soon as
// it has been read. The testbench measures the cycles during which read
// data flow (they must be Nc/M, one address set per cycle, without gaps)
// and turns them into the decoder throughput estimate
//     T = 2*Nc*f / (2*I*(read_cycles + 2W)),   I = 8, f = 200 MHz,
// where 2W is the SISO latency. T is compared with the expected value for
// the size (the M, W configuration table), to 0.1 Mb/s. It also reports the
// cycles until the last write-back, which adds about one window.
module tb_wimax_throughput;
  import wimax_ctc_pkg::*;
  import wimax_ref_pkg::*;

  // expected throughput in units of 0.1 Mb/s
  localparam int T_EXP [NSIZES] = '{83, 83, 83, 125, 125, 150, 167, 250, 250,
                                    250, 300, 300, 357, 750, 818, 857, 882};

  logic clk = 0, rst_n = 0, start = 0, scrambled = 1;
  size_idx_t size_idx = '0;
  logic busy, siso_rvalid, siso_rlast, wr_ready, siso_wvalid = 0, lifo_overflow, lifo_underflow;
  logic [MMAX-1:0] cfg_active;
  nc_t cfg_len;
  win_t cfg_win;
  triplet_t [MMAX-1:0] siso_rdata, siso_wdata;

  parallel_interleaver dut (
    .clk(clk), .rst_n(rst_n), .start(start), .size_idx(size_idx), .scrambled(scrambled),
    .busy(busy), .cfg_active(cfg_active), .cfg_len(cfg_len), .cfg_win(cfg_win),
    .siso_rvalid(siso_rvalid), .siso_rlast(siso_rlast), .siso_rdata(siso_rdata),
    .wr_ready(wr_ready), .siso_wvalid(siso_wvalid), .siso_wdata(siso_wdata),
    .lifo_overflow(lifo_overflow), .lifo_underflow(lifo_underflow));

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int rj, wwin, we, cur_w;
  bit writing;

  always @(posedge clk) begin
    if (rst_n && siso_rvalid) rj++;
    if (rst_n && (lifo_overflow || lifo_underflow)) begin
      failures++;
      $display("FAIL LIFO error");
    end
  end

  // SISO stand-in: writes each complete window back, newest first.
  always @(negedge clk) begin
    if (!writing && rj >= (wwin + 1) * cur_w && cur_w > 0 && wr_ready) begin
      writing = 1;
      we = cur_w - 1;
    end
    siso_wvalid = writing;
    siso_wdata  = '0;
    if (writing) begin
      if (we == 0) begin
        writing = 0;
        wwin++;
      end else we--;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSIZES; s++) begin
      int n, m, w, cyc, first, last, reads, t10;
      real t;
      n = ref_nc(s); m = ref_m(s); w = ref_w(s);
      cur_w = w; rj = 0; wwin = 0; writing = 0;
      @(negedge clk);
      size_idx = size_idx_t'(s); start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; first = -1; last = -1; reads = 0;
      while (busy) begin
        if (siso_rvalid) begin
          if (first < 0) first = cyc;
          last = cyc;
          reads++;
        end
        @(negedge clk);
        cyc++;
      end
      t = 2.0 * n * 200.0 / (2.0 * 8.0 * real'(last - first + 1 + 2 * w));
      t10 = $rtoi(t * 10.0 + 0.5);
      checks++;
      if (reads != n / m || last - first + 1 != n / m || t10 != T_EXP[s]) begin
        failures++;
        $display("FAIL Nc=%0d: %0d reads over %0d cycles, T=%.1f Mb/s, expected %.1f", n, reads,
                 last - first + 1, t, real'(T_EXP[s]) / 10.0);
      end
      $display("Nc=%4d M=%0d W=%2d: read %4d cycles, write-back done after %4d cycles, T = %5.1f Mb/s",
               n, m, w, last - first + 1, cyc, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
