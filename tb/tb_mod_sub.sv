// tb_mod_sub -- random check of the subtract-and-select modulo unit
// against the '%' operator, including the boundary operands 0, n-1, n and
// 2n-1.
module tb_mod_sub;
  logic [12:0] x;
  logic [11:0] n, y;
  int checks = 0, failures = 0;

  mod_sub #(.W(12)) dut (.x(x), .n(n), .y(y));

  task automatic check(int nn, int xx);
    n = 12'(nn); x = 13'(xx);
    #1;
    checks++;
    if (int'(y) != xx % nn) begin
      failures++;
      $display("FAIL x=%0d n=%0d y=%0d", xx, nn, y);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int nn;
      nn = 1 + int'($urandom_range(4094));
      check(nn, int'($urandom_range(2 * nn - 1)));
    end
    check(2400, 0); check(2400, 2399); check(2400, 2400); check(2400, 4799);
    check(24, 47); check(24, 23); check(24, 24);
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
