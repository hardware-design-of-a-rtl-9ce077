// tb_adx_extract -- for every block size and its M, checks memory index
// and in-memory address of every Pi in 0..Nc-1 against division and
// remainder by L = Nc/M.
module tb_adx_extract;
  import wimax_ref_pkg::*;
  logic [11:0] pi, l;
  logic [1:0]  log2m;
  logic [9:0]  adx;
  logic [1:0]  idx0;
  int checks = 0, failures = 0;

  adx_extract dut (.pi(pi), .l(l), .log2m(log2m), .adx(adx), .idx0(idx0));

  initial begin
    for (int s = 0; s < NSIZES; s++) begin
      int n, m, ll;
      n = ref_nc(s); m = ref_m(s); ll = n / m;
      l = 12'(ll);
      log2m = (m == 4) ? 2'd2 : (m == 2) ? 2'd1 : 2'd0;
      for (int p = 0; p < n; p++) begin
        pi = 12'(p);
        #1;
        checks++;
        if (int'(adx) != p % ll || int'(idx0) != p / ll) begin
          failures++;
          if (failures < 10) $display("FAIL Nc=%0d p=%0d adx=%0d idx0=%0d", n, p, adx, idx0);
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
