// conv_mod2n_m1: binary number of six n-bit blocks -> residue modulo 2^n - 1.
//
// With 2^n = 1 (mod 2^n - 1) the residue is just the sum of the blocks,
//   x mod (2^n - 1) = B0 + B1 + ... + B5,
// computed by four carry-save rows with end-around carry (odd blocks, even
// blocks, then two rows merging the pairs), an n-bit adder with carry in 0 and
// a half-adder row adding its carry out. Same arrangement as the 2^n + 1
// converter without the inverters.
//
// Output: n-bit residue; zero may appear as all zeros or all ones.
// Combinational. Arrangement from the document's six-block converter diagram.
module conv_mod2n_m1 #(
  parameter int unsigned N = 8
) (
  input  logic [6*N-1:0] x,
  output logic [N-1:0]   r
);
  logic [N-1:0] blk [6];
  logic [N-1:0] so, co, se, ce, s3, c3, s4, c4;
  logic [N:0]   add1, add2;

  always_comb
    for (int i = 0; i < 6; i++) blk[i] = x[i*N +: N];

  csa_eac #(.W(N), .INVERT(1'b0)) u_odd  (.x(blk[5]), .y(blk[3]), .z(blk[1]), .sum(so), .carry(co));
  csa_eac #(.W(N), .INVERT(1'b0)) u_even (.x(blk[4]), .y(blk[2]), .z(blk[0]), .sum(se), .carry(ce));
  csa_eac #(.W(N), .INVERT(1'b0)) u_mrg1 (.x(so), .y(ce), .z(se), .sum(s3), .carry(c3));
  csa_eac #(.W(N), .INVERT(1'b0)) u_mrg2 (.x(co), .y(c3), .z(s3), .sum(s4), .carry(c4));

  always_comb begin
    add1 = {1'b0, s4} + {1'b0, c4};
    add2 = {1'b0, add1[N-1:0]} + (N+1)'(add1[N]);
    r    = add2[N-1:0];
  end
endmodule
