// mod_sub -- "x mod n" for 0 <= x < 2n, built from one subtracter and a
// multiplexer: d = x - n; the result is d when the subtraction does not
// borrow, otherwise x. Every modulo operation of the interleaver address
// generator is one of these, which is why all its operands are kept in
// [0, 2n-1]; this is the published structure. Combinational; W is the
// width of n and of the result.
module mod_sub #(
  parameter int W = 12
) (
  input  logic [W:0]   x,     // operand, 0 <= x < 2n
  input  logic [W-1:0] n,     // modulus
  output logic [W-1:0] y      // x mod n
);

  logic [W+1:0] d;

  always_comb begin
    d = {1'b0, x} - {2'b00, n};
    y = d[W+1] ? x[W-1:0] : d[W-1:0];   // borrow -> x < n
  end

endmodule
