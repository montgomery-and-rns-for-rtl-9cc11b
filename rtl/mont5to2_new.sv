// mont5to2_new: radix-2 Montgomery multiplier, "new" algorithm, five-to-two
// carry-save architecture.
//
// Computes S1 + S2 == a * b * 2^-n (mod N), with a = a1 + a2 and b = b1 + b2
// given and returned in carry-save form, n = N_BITS.
//
// Algorithm: b is used doubled (B = 2b), so bit 0 of B is zero and the
// quotient bit of each step is simply the parity of the partial sum,
// q_i = S1[i]_0 xor S2[i]_0. The loop then runs n+1 times (i = 0..n):
//     S[i+1] = (S[i] + a_i*B + q_i*N) / 2
// which yields a*2b*2^-(n+1) = a*b*2^-n. The five operands S1, S2, a_i&2b1,
// a_i&2b2 and q_i&N are reduced by three chained 3:2 CSA arrays and the two
// resulting vectors are halved into the SUM/CARRY register. q_i depends only on
// register bits, so the N AND-gate row is ready before the CSA chain needs it.
// Bits a_i come one per clock from a barrel register full adder (brfa), so a
// is never added up; its extra bit a_n is forced to zero.
//
// Timing: start (one clock) clears S1/S2 and loads a1/a2 into the BRFA; the
// next n+1 clocks perform iterations 0..n. done is high for one cycle, the
// cycle right after the last iteration, when s1/s2 hold the result: n+2 clocks
// from the start edge to the result, as the document states. b1, b2 and n_mod
// must stay stable from the start edge until done; a1/a2 are only sampled at
// start. A new start may be given in the done cycle.
//
// Range: the operands are n bits wide. The loop has no final subtraction, so
// with inputs below 2N the result stays below 2N only if N < 2^(n-2); the
// caller must keep the modulus below that (two spare top bits). The CSA chain
// is computed n+3 bits wide so that no vector can overflow before the halving;
// the register keeps n+1 bits, as in the block diagram.
module mont5to2_new #(
  parameter int unsigned N_BITS = 1024
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [N_BITS-1:0] a1,
  input  logic [N_BITS-1:0] a2,
  input  logic [N_BITS-1:0] b1,
  input  logic [N_BITS-1:0] b2,
  input  logic [N_BITS-1:0] n_mod,
  output logic [N_BITS:0]   s1,
  output logic [N_BITS:0]   s2,
  output logic              busy,
  output logic              done
);
  localparam int unsigned WI = N_BITS + 3;
  localparam int unsigned CW = $clog2(N_BITS + 2);

  logic [CW-1:0] iter;
  logic          a_i, q_i;
  logic [WI-1:0] x_s1, x_s2, x_b1, x_b2, x_n;
  logic [WI-1:0] c1_s, c2_s, c3_s;
  logic [WI:0]   c1_c, c2_c, c3_c;
  logic [WI-1:0] nxt_s, nxt_c;

  brfa #(.W(N_BITS)) u_brfa (
    .clk      (clk),
    .rst      (rst),
    .load     (start),
    .advance  (busy),
    .zero_out (iter == CW'(N_BITS)),
    .a1       (a1),
    .a2       (a2),
    .bit_o    (a_i)
  );

  // Operand rows of the five-to-two array.
  always_comb begin
    q_i  = s1[0] ^ s2[0];
    x_s1 = WI'(s1);
    x_s2 = WI'(s2);
    x_b1 = a_i ? WI'({b1, 1'b0}) : '0;
    x_b2 = a_i ? WI'({b2, 1'b0}) : '0;
    x_n  = q_i ? WI'(n_mod) : '0;
  end

  csa_array #(.W(WI)) u_csa1 (.x1(x_s1), .x2(x_s2), .x3(x_b1), .sum(c1_s), .carry(c1_c));
  csa_array #(.W(WI)) u_csa2 (.x1(c1_s), .x2(c1_c[WI-1:0]), .x3(x_b2), .sum(c2_s), .carry(c2_c));
  csa_array #(.W(WI)) u_csa3 (.x1(c2_s), .x2(c2_c[WI-1:0]), .x3(x_n), .sum(c3_s), .carry(c3_c));

  // The total is even (q_i makes it so) and the carry vector has a zero LSB,
  // hence the sum vector's LSB is zero too and both halve exactly.
  always_comb begin
    nxt_s = c3_s >> 1;
    nxt_c = c3_c[WI-1:0] >> 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1   <= '0;
      s2   <= '0;
      iter <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        s1   <= '0;
        s2   <= '0;
        iter <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        s1   <= nxt_s[N_BITS:0];
        s2   <= nxt_c[N_BITS:0];
        iter <= iter + 1'b1;
        if (iter == CW'(N_BITS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
