// add_mod2n_m1: accumulating modulo 2^n - 1 adder.
//
// Each clock the n-bit input is added to the n-bit internal register by an
// n-bit adder and a half-adder row that adds the carry out back in (end-around
// carry, since 2^n = 1 mod 2^n - 1). No diminished-1 form, no carry inversion
// and no zero detection: a zero input simply adds nothing, which is how the
// caller holds the sum.
//
// Interface: din (n bits), acc (n bits, register output; 0 may appear as all
// ones). rst: synchronous clear. Structure from the document's adder diagram.
module add_mod2n_m1 #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] din,
  output logic [N-1:0] acc
);
  logic [N:0] add1, add2;

  always_comb begin
    add1 = {1'b0, acc} + {1'b0, din};
    add2 = {1'b0, add1[N-1:0]} + (N+1)'(add1[N]);
  end

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= add2[N-1:0];
  end
endmodule
