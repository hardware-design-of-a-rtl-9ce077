// tb_m_lut -- checks M and W for all 17 block sizes, and that every
// configuration gives an even Nc/M and an integer number of windows.
module tb_m_lut;
  import wimax_ref_pkg::*;
  logic [4:0] size_idx;
  logic [1:0] log2m;
  logic [5:0] win_len;
  int checks = 0, failures = 0;

  m_lut dut (.size_idx(size_idx), .log2m(log2m), .win_len(win_len));

  initial begin
    for (int s = 0; s < NSIZES; s++) begin
      int m, l;
      size_idx = 5'(s);
      #1;
      m = 1 << log2m;
      l = ref_nc(s) / m;
      checks++;
      if (m != ref_m(s) || int'(win_len) != ref_w(s)) begin
        failures++;
        $display("FAIL size %0d: M=%0d W=%0d", s, m, win_len);
      end
      checks++;
      if (l % 2 != 0 || l % int'(win_len) != 0) begin
        failures++;
        $display("FAIL size %0d: L=%0d W=%0d", s, l, win_len);
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
