// tb_param_lut -- checks Nc, P0 and K_q mod Nc of all 17 block sizes
// against the reference table, and that out-of-range indices select the
// largest size.
module tb_param_lut;
  import wimax_ref_pkg::*;
  logic [4:0]        size_idx;
  logic [11:0]       nc;
  logic [5:0]        p0;
  logic [3:1][11:0]  kmod;
  int checks = 0, failures = 0;

  param_lut dut (.size_idx(size_idx), .nc(nc), .p0(p0), .kmod(kmod));

  initial begin
    for (int s = 0; s < 20; s++) begin
      int r;
      r = (s < NSIZES) ? s : NSIZES - 1;
      size_idx = 5'(s);
      #1;
      checks++;
      if (int'(nc) != ref_nc(r) || int'(p0) != TAB[r][1]) begin
        failures++;
        $display("FAIL size %0d: nc=%0d p0=%0d", s, nc, p0);
      end
      for (int q = 1; q < 4; q++) begin
        checks++;
        if (int'(kmod[q]) != ref_k(r, q) % ref_nc(r)) begin
          failures++;
          $display("FAIL size %0d K%0d mod Nc = %0d", s, q, kmod[q]);
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
