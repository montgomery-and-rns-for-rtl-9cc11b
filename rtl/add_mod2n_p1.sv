// add_mod2n_p1: accumulating modulo 2^n + 1 adder, diminished-1 in, binary out.
//
// Each clock the diminished-1 input d(x) is added to the n-bit internal
// register by an n-bit adder and a half-adder row that adds the inverted carry
// out (diminished-1 addition: reg + d(x) + 1 mod 2^n + 1). The register is
// cleared by reset. Reading the cleared register as the ordinary number 0
// rather than as d(1), the register always holds the ordinary binary value of
// the running sum: after inputs x1..xk it holds x1 + ... + xk mod 2^n + 1.
// So the output needs no conversion out of diminished-1 form.
//
// An input with bit n set is the value zero: the register is then not loaded
// (the document gates the register clock with the inverted MSB; here the same
// effect is a load enable). This is also how the caller holds the sum.
//
// Interface: din (n+1 bits, diminished-1), acc (n bits, ordinary binary,
// register output). rst: synchronous clear. The sum 2^n (= -1) has no n-bit
// code; the n-bit register of the document's diagram holds it as 0.
module add_mod2n_p1 #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N:0]   din,
  output logic [N-1:0] acc
);
  logic [N:0] add1, add2;

  always_comb begin
    add1 = {1'b0, acc} + {1'b0, din[N-1:0]};
    add2 = {1'b0, add1[N-1:0]} + (N+1)'(!add1[N]);
  end

  always_ff @(posedge clk) begin
    if (rst)          acc <= '0;
    else if (!din[N]) acc <= add2[N-1:0];
  end
endmodule
