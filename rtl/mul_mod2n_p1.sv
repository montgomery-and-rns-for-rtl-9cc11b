// mul_mod2n_p1: modulo 2^n + 1 multiplier on diminished-1 numbers.
//
// Numbers are in diminished-1 form, d(x) = x - 1, on n+1 bits: bit n set means
// the value zero (and the low bits are then zero); otherwise bits n-1..0 hold
// x - 1. The product is formed without a 2n-bit array, as
//   d(ab) = ( sum_{i=1..n-1} b_i d(2^i a)  (+)  ~Z  (+)  d1(a) ) + 1
// where b_i are the bits of d(b), (+) is diminished-1 addition, Z is the number
// of zero bits among b_1..b_{n-1}, ~Z its n-bit one's complement, and
// d1(a) = b_0 ? d(2a) : d(a). d(2^i a) is d(a) rotated left by i places with the
// wrapped-around bits inverted; a term whose b_i is 0 contributes zero.
//
// The n+1 partial products go through a Wallace tree of n-1 carry-save rows
// with inverted end-around carry (csa_tree_eac, INVERT=1), each row performing
// one diminished-1 addition; for n = 8 the tree levels hold 3, 2, 1 and 1 rows. The two remaining vectors are added by an n-bit adder whose carry
// in is 1 (the final +1 of the formula) and then by a half-adder row that adds
// the inverted carry out (modulo 2^n + 1 carry correction). The carry out of that
// half-adder row is bit n of the result: set only when the product is zero,
// which happens when 2^n + 1 is not prime. If either operand is zero the output
// is forced to zero, since the formula does not hold for a zero operand.
//
// Purely combinational. Partial products, Z, the Wallace-tree carry-save
// reduction and the two-adder end follow the document's 2^8+1 multiplier; the
// carry in of 1 on the first adder is derived from the product formula, and
// the order in which terms enter the tree is this design's choice.
module mul_mod2n_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] da,
  input  logic [N:0] db,
  output logic [N:0] dp
);
  localparam int unsigned ZW = $clog2(N);

  logic [N-1:0] a, b;
  logic [N-1:0] term [N+1];
  logic [N-1:0] red_s, red_c;
  logic [ZW-1:0] zcnt;
  logic [N:0]   add1;
  logic [N:0]   add2;

  always_comb begin
    a    = da[N-1:0];
    b    = db[N-1:0];
    zcnt = '0;
    for (int i = 1; i < N; i++) begin
      zcnt = zcnt + ZW'(!b[i]);
      term[i] = b[i] ? ((a << i) | (~a >> (N - i))) : '0;
    end
    term[0] = b[0] ? {a[N-2:0], ~a[N-1]} : a;
    term[N] = ~N'(zcnt);
  end

  csa_tree_eac #(.W(N), .TERMS(N+1), .INVERT(1'b1)) u_tree (
    .terms(term), .sum_o(red_s), .carry_o(red_c)
  );

  always_comb begin
    add1 = {1'b0, red_s} + {1'b0, red_c} + (N+1)'(1);
    add2 = {1'b0, add1[N-1:0]} + (N+1)'(!add1[N]);
    if (da[N] || db[N]) dp = {1'b1, {N{1'b0}}};
    else                dp = add2;
  end
endmodule
