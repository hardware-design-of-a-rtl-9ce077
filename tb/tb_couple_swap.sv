// tb_couple_swap -- random triplets with and without swap: l01 and l10
// exchange places only when 'swap' is set, l11 never moves.
module tb_couple_swap;
  import wimax_ctc_pkg::*;
  triplet_t din, dout;
  logic swap;
  int checks = 0, failures = 0;

  couple_swap dut (.din(din), .swap(swap), .dout(dout));

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [23:0] r;
      r = 24'($urandom);
      din = r;
      swap = t[0];
      #1;
      checks++;
      if (dout != (swap ? {r[23:16], r[7:0], r[15:8]} : r)) begin
        failures++;
        $display("FAIL %h swap=%0d -> %h", r, swap, dout);
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
