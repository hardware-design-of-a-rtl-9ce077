// tb_address_generator -- runs a scrambled and an in-order half iteration
// for every block size. Each cycle it checks, for every active SISO k,
// that idx^k * L + adx equals the reference Pi(j + k*L), that the swap
// flag is the parity of Pi(j), that one address set is produced per cycle
// for Nc/M cycles, that the first set comes two cycles after 'start' and
// that 'last' marks the final set.
module tb_address_generator;
  import wimax_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, scrambled = 0;
  logic [4:0] size_idx = 0;
  logic busy, valid, last, swap;
  logic [9:0] adx;
  logic [3:0][1:0] idx;
  logic [3:0] active;
  logic [11:0] nc, len;
  logic [1:0] log2m;
  logic [5:0] win_len;
  int checks = 0, failures = 0;

  address_generator dut (
    .clk(clk), .rst_n(rst_n), .start(start), .size_idx(size_idx), .scrambled(scrambled),
    .busy(busy), .valid(valid), .last(last), .adx(adx), .idx(idx), .active(active),
    .swap(swap), .nc(nc), .log2m(log2m), .len(len), .win_len(win_len));

  always #5 clk = !clk;

  task automatic run(int s, bit scr);
    int n, m, ll, jj, lat;
    n = ref_nc(s); m = ref_m(s); ll = n / m;
    @(negedge clk);
    size_idx = 5'(s); scrambled = scr; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!valid) begin
      @(negedge clk);
      lat++;
      if (lat > 10) break;
    end
    checks++;
    if (lat != 2) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    jj = 0;
    while (valid) begin
      for (int k = 0; k < 4; k++) begin
        int exp_p, got;
        checks++;
        if (active[k] != (k < m)) failures++;
        if (k < m) begin
          exp_p = scr ? ref_pi(s, jj + k * ll) : jj + k * ll;
          got   = int'(idx[k]) * ll + int'(adx);
          if (got != exp_p) begin
            failures++;
            if (failures < 10) $display("FAIL Nc=%0d scr=%0d j=%0d k=%0d got %0d exp %0d", n, scr, jj, k, got, exp_p);
          end
        end
      end
      checks++;
      if (swap != (scr ? bit'(ref_pi(s, jj) % 2) : 1'b0) || last != (jj == ll - 1))
        failures++;
      jj++;
      @(negedge clk);
    end
    checks++;
    if (jj != ll || busy) begin
      failures++;
      $display("FAIL Nc=%0d produced %0d sets, expected %0d", n, jj, ll);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSIZES; s++) run(s, 1);
    for (int s = 0; s < NSIZES; s += 4) run(s, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
