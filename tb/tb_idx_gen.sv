// tb_idx_gen -- for every block size and every idx0 checks that SISO-k's
// memory index agrees with the memory of Pi(j + k*L) computed from the
// reference interleaver, and that only SISOs k < M are active.
module tb_idx_gen;
  import wimax_ref_pkg::*;
  logic [1:0] idx0, log2m;
  logic [5:0] p0;
  logic [3:0][1:0] idx;
  logic [3:0] active;
  int checks = 0, failures = 0;

  idx_gen dut (.idx0(idx0), .log2m(log2m), .p0(p0), .idx(idx), .active(active));

  initial begin
    for (int s = 0; s < NSIZES; s++) begin
      int n, m, ll;
      n = ref_nc(s); m = ref_m(s); ll = n / m;
      log2m = (m == 4) ? 2'd2 : (m == 2) ? 2'd1 : 2'd0;
      p0 = 6'(TAB[s][1]);
      // walk j over the first L positions and take idx0 from the reference
      for (int jj = 0; jj < ll; jj += 7) begin
        idx0 = 2'(ref_pi(s, jj) / ll);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (active[k] != (k < m)) failures++;
          if (k < m && int'(idx[k]) != ref_pi(s, jj + k * ll) / ll) begin
            failures++;
            if (failures < 10) $display("FAIL Nc=%0d j=%0d k=%0d idx=%0d", n, jj, k, idx[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
