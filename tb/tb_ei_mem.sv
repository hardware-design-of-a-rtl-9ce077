// tb_ei_mem -- random writes and reads on a full-size 600 x 24 memory
// against a model: data one cycle after 're', output held without 're',
// old word returned on a read and write of the same address.
module tb_ei_mem;
  logic clk = 0, re = 0, we = 0;
  logic [9:0] raddr = 0, waddr = 0;
  logic [23:0] rdata, wdata = 0;
  logic [23:0] model [600];
  int checks = 0, failures = 0;

  ei_mem #(.DEPTH(600), .DW(24)) dut (.clk(clk), .re(re), .raddr(raddr), .rdata(rdata),
                                      .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = !clk;

  initial begin
    // fill
    for (int a = 0; a < 600; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = 24'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [23:0] exp_d, held;
      int ra;
      ra = int'($urandom_range(599));
      re = ($urandom_range(3) != 0);
      raddr = 10'(ra);
      we = 1'($urandom_range(1));
      waddr = (t % 5 == 0) ? 10'(ra) : 10'($urandom_range(599));
      wdata = 24'($urandom);
      exp_d = model[ra];
      held = rdata;
      @(negedge clk);
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata != (re ? exp_d : held)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr %0d got %h exp %h", t, ra, rdata, re ? exp_d : held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
