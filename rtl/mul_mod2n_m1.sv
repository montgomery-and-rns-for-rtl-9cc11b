// mul_mod2n_m1: modulo 2^n - 1 multiplier.
//
// Since 2^n = 1 (mod 2^n - 1), a*2^i is a rotated left by i places, so
//   a*b = sum_{i=0..n-1} b_i * rotl(a, i)   (mod 2^n - 1).
// The n partial products go through a Wallace tree of n-2 carry-save rows with
// end-around carry (csa_tree_eac, INVERT=0; levels of 2, 2, 1, 1 rows for
// n = 8); an n-bit adder (carry in 0) and a half-adder row that
// adds its carry out finish the sum. Unlike the 2^n + 1 multiplier there is no
// zero count, no d1(a) term, no carry inversion and no zero detection. Zero
// has two codes on the output, all zeros and all ones; both mean 0.
//
// Purely combinational; inputs and output are n-bit residues. The partial
// products, the Wallace tree and the two-adder end follow the document's 2^8-1
// multiplier; the order in which terms enter the tree is this design's choice.
module mul_mod2n_m1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);
  logic [N-1:0] term [N];
  logic [N-1:0] red_s, red_c;
  logic [N:0]   add1;
  logic [N:0]   add2;

  always_comb begin
    term[0] = b[0] ? a : '0;
    for (int i = 1; i < N; i++)
      term[i] = b[i] ? ((a << i) | (a >> (N - i))) : '0;
  end

  csa_tree_eac #(.W(N), .TERMS(N), .INVERT(1'b0)) u_tree (
    .terms(term), .sum_o(red_s), .carry_o(red_c)
  );

  always_comb begin
    add1 = {1'b0, red_s} + {1'b0, red_c};
    add2 = {1'b0, add1[N-1:0]} + (N+1)'(add1[N]);
    p    = add2[N-1:0];
  end
endmodule
