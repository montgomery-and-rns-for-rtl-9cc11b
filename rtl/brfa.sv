// brfa: barrel register full adder.
//
// Produces the bits of a = a1 + a2 one per clock, least significant first,
// without ever forming the full-width sum. Two barrel (rotating) registers
// hold a1 and a2; each clock their bit 0 goes through one full adder whose
// carry is kept in a one-bit carry register, and both registers rotate right
// by one place, so after W clocks they hold their original contents again.
//
// Interface and timing:
//   load     : on this clock edge a1/a2 are captured and the carry register is
//              cleared. bit_o then shows bit 0 of a1 + a2.
//   advance  : on this clock edge the registers rotate and the carry is
//              updated; bit_o then shows the next bit.
//   zero_out : forces bit_o to 0. The multiplier uses it in its extra
//              (n+1)-th iteration, where bit a_n must read as zero.
//   bit_o    : combinational full-adder sum = current bit a_i.
// The structure (two rotating registers, one full adder, a carry register)
// follows the barrel register full adder diagram; the load/advance controls
// and the forced-zero output are this design's own interface.
module brfa #(
  parameter int unsigned W = 1024
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         advance,
  input  logic         zero_out,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a2,
  output logic         bit_o
);
  logic [W-1:0] r1, r2;
  logic         cy;
  logic         fa_sum, fa_cout;

  always_comb begin
    fa_sum  = r1[0] ^ r2[0] ^ cy;
    fa_cout = (r1[0] & r2[0]) | (r1[0] & cy) | (r2[0] & cy);
    bit_o   = fa_sum & ~zero_out;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r1 <= '0;
      r2 <= '0;
      cy <= 1'b0;
    end else if (load) begin
      r1 <= a1;
      r2 <= a2;
      cy <= 1'b0;
    end else if (advance) begin
      r1 <= {r1[0], r1[W-1:1]};
      r2 <= {r2[0], r2[W-1:1]};
      cy <= fa_cout;
    end
  end
endmodule
