// tb_data_switch -- random permutations, data and enables on the 4 x 24-bit
// triplet crossbar; checks out[sel[i]] = in[i] and the output enables.
module tb_data_switch;
  logic [3:0][23:0] din, dout;
  logic [3:0][1:0]  sel;
  logic [3:0]       en, oen;
  int checks = 0, failures = 0;

  data_switch #(.N(4), .DW(24)) dut (.din(din), .sel(sel), .en(en), .dout(dout), .oen(oen));

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int perm [4];
      perm = '{0, 1, 2, 3};
      perm.shuffle();
      for (int i = 0; i < 4; i++) begin
        din[i] = 24'($urandom);
        sel[i] = 2'(perm[i]);
        en[i]  = ($urandom_range(3) != 0);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (oen[perm[i]] != en[i] || (en[i] && dout[perm[i]] != din[i]) ||
            (!en[i] && dout[perm[i]] != '0)) begin
          failures++;
          if (failures < 10) $display("FAIL in %0d -> out %0d", i, perm[i]);
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
