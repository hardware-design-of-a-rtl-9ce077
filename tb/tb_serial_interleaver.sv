// tb_serial_interleaver -- steps the serial interleaver through a whole
// frame of every block size and compares Pi(j) with the reference law each
// cycle; also checks that every frame is a permutation of 0..Nc-1 and that
// one address is produced per clock cycle.
module tb_serial_interleaver;
  import wimax_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [11:0] nc, j, pi;
  logic [5:0] p0;
  logic [3:1][11:0] kmod;
  int checks = 0, failures = 0;
  bit seen [2400];

  serial_interleaver dut (.clk(clk), .rst_n(rst_n), .clear(clear), .step(step),
                          .nc(nc), .p0(p0), .kmod(kmod), .j(j), .pi(pi));

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSIZES; s++) begin
      int n, cyc;
      n  = ref_nc(s);
      nc = 12'(n);
      p0 = 6'(TAB[s][1]);
      for (int q = 1; q < 4; q++) kmod[q] = 12'(ref_k(s, q) % n);
      foreach (seen[i]) seen[i] = 0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; step = 1;
      cyc = 0;
      for (int jj = 0; jj < n; jj++) begin
        checks++;
        if (int'(j) != jj || int'(pi) != ref_pi(s, jj) || seen[pi]) begin
          failures++;
          if (failures < 10) $display("FAIL Nc=%0d j=%0d/%0d pi=%0d exp %0d", n, j, jj, pi, ref_pi(s, jj));
        end
        seen[pi] = 1;
        @(negedge clk);
        cyc++;
      end
      step = 0;
      checks++;
      if (cyc != n) failures++;
    end
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
