// tb_radx_switch -- drives every permutation of 4 memory indices with
// random active masks (M = 1, 2, 4) and checks that memory idx[k] reports
// SISO k, that unused memories report no access and that nothing is
// reported without 'valid'.
module tb_radx_switch;
  logic [3:0][1:0] idx, radx;
  logic [3:0] active, hit;
  logic valid;
  int checks = 0, failures = 0;

  radx_switch dut (.valid(valid), .idx(idx), .active(active), .radx(radx), .hit(hit));

  initial begin
    for (int t = 0; t < 600; t++) begin
      int perm [4];
      int m;
      perm = '{0, 1, 2, 3};
      perm.shuffle();
      m = (t % 3 == 0) ? 1 : (t % 3 == 1) ? 2 : 4;
      // with M < 4 only the first M memories are used
      if (m < 4) for (int k = 0; k < 4; k++) perm[k] = (k < m) ? (perm[k] % m) : k;
      if (m == 2 && perm[0] == perm[1]) perm[1] = 1 - perm[0];
      for (int k = 0; k < 4; k++) begin
        idx[k] = 2'(perm[k]);
        active[k] = (k < m);
      end
      valid = (t % 7 != 6);
      #1;
      for (int mm = 0; mm < 4; mm++) begin
        bit exp_hit;
        int exp_k;
        exp_hit = 0; exp_k = 0;
        for (int k = 0; k < m; k++) if (valid && perm[k] == mm) begin exp_hit = 1; exp_k = k; end
        checks++;
        if (hit[mm] != exp_hit || (exp_hit && int'(radx[mm]) != exp_k)) begin
          failures++;
          if (failures < 10) $display("FAIL mem %0d hit=%0d radx=%0d", mm, hit[mm], radx[mm]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
