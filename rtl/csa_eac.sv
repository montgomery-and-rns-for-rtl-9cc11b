// csa_eac: 3:2 carry-save adder row for modulo 2^n - 1 or 2^n + 1 arithmetic.
//
// Like a plain CSA row (sum = x^y^z, carry = majority shifted left), except that
// the carry leaving the top bit is not dropped but fed back into bit 0 of the
// carry vector (end-around carry):
//   INVERT = 0 : carry fed back as is.    sum + carry == x + y + z  (mod 2^n - 1)
//   INVERT = 1 : carry fed back inverted. sum + carry == x + y + z + 1 (mod 2^n + 1),
//                which is exactly diminished-1 addition: if x, y, z are
//                diminished-1 numbers, sum and carry are diminished-1 numbers
//                with the same diminished-1 total.
// Both follow from 2^n = 1 (mod 2^n - 1) and 2^n = -1 (mod 2^n + 1). Every row
// of the residue multipliers and converters is one of these. Combinational.
module csa_eac #(
  parameter int unsigned W      = 8,
  parameter bit          INVERT = 1'b0
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], maj[W-1] ^ INVERT};
  end
endmodule
