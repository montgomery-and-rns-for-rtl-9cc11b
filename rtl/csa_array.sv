// csa_array: a row of W full adders used as a 3:2 carry-save adder.
//
// Each bit position computes sum = x1 ^ x2 ^ x3 and carry = majority(x1, x2, x3);
// the carry vector is returned already shifted one place left, so that
// sum + carry == x1 + x2 + x3 exactly (no carry propagates along the row).
// This is the "CSA ARRAY" box of the five-to-two multiplier diagrams.
// Purely combinational. The carry output is one bit wider than the inputs so
// that nothing is lost; callers truncate where the value range allows it.
module csa_array #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum,
  output logic [W:0]   carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = x1 ^ x2 ^ x3;
    maj   = (x1 & x2) | (x1 & x3) | (x2 & x3);
    carry = {maj, 1'b0};
  end
endmodule
