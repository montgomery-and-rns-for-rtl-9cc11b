// conv_dim1_p1: binary number of six n-bit blocks -> diminished-1 residue
// modulo 2^n + 1.
//
// With x = (B5 B4 B3 B2 B1 B0) in n-bit blocks and 2^n = -1 (mod 2^n + 1),
//   x mod (2^n + 1) = (B0 + B2 + B4) - (B1 + B3 + B5).
// The even and the odd blocks are each summed by one carry-save row with
// inverted end-around carry, pretending the blocks are already diminished-1
// numbers. Because both groups hold three blocks, the error of that pretence
// is the same in both and cancels in the subtraction, which is done as
// d(x - y) = d(x) + ~d(y) + 1: the odd group's sum and carry vectors are
// inverted and folded into the even group's pair by two more carry-save rows.
// An n-bit adder (carry in 0) and a half-adder row that adds its inverted carry
// out produce d(x mod (2^n + 1)).
//
// Output on n+1 bits in the diminished-1 code of mul_mod2n_p1: bit n is set
// (low bits zero) when the residue is zero. Combinational. The six-block
// arrangement, inverters and adders follow the document's converter diagram;
// bringing out bit n as the zero flag is this design's choice.
module conv_dim1_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [6*N-1:0] x,
  output logic [N:0]     dr
);
  logic [N-1:0] blk [6];
  logic [N-1:0] so, co, se, ce, s3, c3, s4, c4;
  logic [N-1:0] so_n, co_n;
  logic [N:0]   add1, add2;

  always_comb
    for (int i = 0; i < 6; i++) blk[i] = x[i*N +: N];

  csa_eac #(.W(N), .INVERT(1'b1)) u_odd  (.x(blk[5]), .y(blk[3]), .z(blk[1]), .sum(so), .carry(co));
  csa_eac #(.W(N), .INVERT(1'b1)) u_even (.x(blk[4]), .y(blk[2]), .z(blk[0]), .sum(se), .carry(ce));

  assign so_n = ~so;
  assign co_n = ~co;

  csa_eac #(.W(N), .INVERT(1'b1)) u_sub1 (.x(so_n), .y(ce), .z(se), .sum(s3), .carry(c3));
  csa_eac #(.W(N), .INVERT(1'b1)) u_sub2 (.x(co_n), .y(c3), .z(s3), .sum(s4), .carry(c4));

  always_comb begin
    add1 = {1'b0, s4} + {1'b0, c4};
    add2 = {1'b0, add1[N-1:0]} + (N+1)'(!add1[N]);
    dr   = add2;
  end
endmodule
