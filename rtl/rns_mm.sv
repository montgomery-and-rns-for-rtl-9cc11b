// rns_mm: residue number system (RNS) Montgomery multiplier, improved Bajard
// form.
//
// What it does: given a and b as residues in two bases B = (m_1..m_K) and
// B' = (m'_1..m'_K) and in a redundant power-of-two modulus m_r, it returns
// r = a*b*M^-1 mod N (up to a small multiple of N, r < (K+1)N) in all three,
// where M is the product of the B moduli. The result can go straight back in
// as an operand, so an exponentiation is a chain of these calls.
//
// How it works: every modulus has its own channel with one modular
// multiplier (a*b mod m) and one modular adder or subtractor. The work runs in
// five groups; within each group all channels run together:
//   1  sigma_i = (a*b) * |-N^-1 M_i^-1|_mi      (B,  2 clocks)
//      sigma_j = (a*b) * |M^-1 M'_j^-1|_mj      (B', 2 clocks)
//      sigma_r = (a*b) * |M^-1|_mr              (m_r, 2 clocks)
//   2  xi_j = sigma_j + sum_i sigma_i * |M_i N M^-1 M'_j^-1|_mj   (K clocks)
//      r_r  = sigma_r + sum_i sigma_i * |M_i N M^-1|_mr
//   3  rho_i = sum_j xi_j * |M'_j|_mi                             (K clocks)
//      alpha1 = sum_j xi_j * |M'^-1 M'_j|_mr
//   4  alpha = alpha1 - r_r * |M'^-1|_mr ;  r_j = xi_j * |M'_j|_mj  (1 clock)
//   5  r_i = rho_i - alpha * |M'|_mi                              (1 clock)
// Group 2 is the first base extension (approximate: the extended value is
// q + beta*M with beta < K, which only adds a multiple of N to r). Groups 3-5
// are the second base extension, made exact by the redundant residue: alpha
// is the number of M' to subtract. In groups 2 and 3 one sigma_i or xi_j per
// clock is broadcast to every channel of the other base.
//
// Interface: moduli and all constants are inputs, meant to come from a
// host-written constant memory; they must be held while busy. Flat buses hold
// element i in bits [i*W +: W]; the K x K tables k2_bp and k3_b hold the
// element for (row, column) at index row*K + column, with row = the channel
// that uses it (j for k2_bp, i for k3_b). All residues must be below their
// modulus. Conditions on the numbers: moduli pairwise coprime, m_r a power of
// two >= K, M < M', (K+2)^2 N < M, gcd(N, M*M') = 1, and a*b < M*N (true for
// a, b < (K+2)N, so results can be fed back).
//
// Timing: start is taken in idle; the a*b products are formed on that clock.
// A multiplication takes 2K+4 clocks, the start clock included: right after
// the (2K+4)-th rising edge done is high for one clock and the results are
// valid; they stay on the outputs until the next result. busy is high from
// the clock after start until done.
//
// From the document: the five groups, the merged constants and their
// multiplication counts (2, K+2, K+2, K+1 per result), the redundant
// power-of-two modulus and the condition m_r >= K. The document's group-1
// constant for B' prints M'^-1 where its derivation gives M'_j^-1; the
// derivation is followed. This design's own choices: moduli are run-time
// inputs with a generic modular multiplier per channel (the document's
// 2^n +- 1 units cannot serve here because it gives no usable moduli set),
// one multiplier per channel with operands picked per group, the clock count,
// r_r kept as an output for chaining, and the small default width W = 7.
module rns_mm #(
  parameter int unsigned K = 10,  // moduli per base
  parameter int unsigned W = 7    // residue width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [K*W-1:0] mod_b,    // m_i
  input  logic [K*W-1:0] mod_bp,   // m'_j
  input  logic [W-1:0]   mod_r,    // m_r, power of two
  input  logic [K*W-1:0] a_b,
  input  logic [K*W-1:0] a_bp,
  input  logic [W-1:0]   a_r,
  input  logic [K*W-1:0] b_b,
  input  logic [K*W-1:0] b_bp,
  input  logic [W-1:0]   b_r,
  input  logic [K*W-1:0] k1_b,     // |-N^-1 M_i^-1|_mi
  input  logic [K*W-1:0] k1_bp,    // |M^-1 M'_j^-1|_mj
  input  logic [W-1:0]   k1_r,     // |M^-1|_mr
  input  logic [K*K*W-1:0] k2_bp,  // [j*K+i] |M_i N M^-1 M'_j^-1|_mj
  input  logic [K*W-1:0] k2_r,     // [i] |M_i N M^-1|_mr
  input  logic [K*K*W-1:0] k3_b,   // [i*K+j] |M'_j|_mi
  input  logic [K*W-1:0] k3_r,     // [j] |M'^-1 M'_j|_mr
  input  logic [W-1:0]   k4_r,     // |M'^-1|_mr
  input  logic [K*W-1:0] k5_b,     // |M'|_mi
  input  logic [K*W-1:0] k5_bp,    // |M'_j|_mj
  output logic [K*W-1:0] r_b,
  output logic [K*W-1:0] r_bp,
  output logic [W-1:0]   r_r,
  output logic           busy,
  output logic           done
);
  localparam int unsigned CW = $clog2(K + 1);

  typedef enum logic [2:0] {
    G_IDLE = 3'd0,
    G_1B   = 3'd1,  // second multiplication of group 1
    G_2    = 3'd2,
    G_3    = 3'd3,
    G_4    = 3'd4,
    G_5    = 3'd5
  } grp_e;

  grp_e          grp;
  logic [CW-1:0] cnt;

  function automatic logic [W-1:0] mulmod(input logic [W-1:0] x,
                                          input logic [W-1:0] y,
                                          input logic [W-1:0] m);
    logic [2*W-1:0] p;
    p = (2*W)'(x) * (2*W)'(y);
    return W'(p % (2*W)'(m));
  endfunction

  function automatic logic [W-1:0] addmod(input logic [W-1:0] x,
                                          input logic [W-1:0] y,
                                          input logic [W-1:0] m);
    logic [W:0] s;
    s = (W+1)'(x) + (W+1)'(y);
    return (s >= (W+1)'(m)) ? W'(s - (W+1)'(m)) : W'(s);
  endfunction

  function automatic logic [W-1:0] submod(input logic [W-1:0] x,
                                          input logic [W-1:0] y,
                                          input logic [W-1:0] m);
    return (x >= y) ? W'(x - y) : W'((W+1)'(x) + (W+1)'(m) - (W+1)'(y));
  endfunction

  // Channel state
  logic [W-1:0] sig_b [K];  // sigma_i
  logic [W-1:0] xi_bp [K];  // sigma_j, then xi_j
  logic [W-1:0] rho_b [K];
  logic [W-1:0] x_r, al1_r, alpha;

  // Values broadcast across bases in groups 2 and 3
  logic [W-1:0] sig_sel, xi_sel;
  always_comb begin
    sig_sel = '0;
    xi_sel  = '0;
    for (int unsigned t = 0; t < K; t++) begin
      if (cnt == CW'(t)) begin
        sig_sel = sig_b[t];
        xi_sel  = xi_bp[t];
      end
    end
  end

  // One multiplier per channel: operands chosen by group
  logic [W-1:0] mx_b [K], my_b [K], pr_b [K];
  logic [W-1:0] mx_bp [K], my_bp [K], pr_bp [K];
  logic [W-1:0] mx_r, my_r, pr_r;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      mx_b[i] = a_b[i*W +: W];
      my_b[i] = b_b[i*W +: W];
      mx_bp[i] = a_bp[i*W +: W];
      my_bp[i] = b_bp[i*W +: W];
      unique case (grp)
        G_1B: begin
          mx_b[i] = sig_b[i];  my_b[i] = k1_b[i*W +: W];
          mx_bp[i] = xi_bp[i]; my_bp[i] = k1_bp[i*W +: W];
        end
        G_2: begin
          mx_bp[i] = sig_sel;
          my_bp[i] = '0;
          for (int unsigned t = 0; t < K; t++)
            if (cnt == CW'(t)) my_bp[i] = k2_bp[(i*K+t)*W +: W];
        end
        G_3: begin
          mx_b[i] = xi_sel;
          my_b[i] = '0;
          for (int unsigned t = 0; t < K; t++)
            if (cnt == CW'(t)) my_b[i] = k3_b[(i*K+t)*W +: W];
        end
        G_4: begin
          mx_bp[i] = xi_bp[i]; my_bp[i] = k5_bp[i*W +: W];
        end
        G_5: begin
          mx_b[i] = alpha;     my_b[i] = k5_b[i*W +: W];
        end
        default: ;
      endcase
      pr_b[i]  = mulmod(mx_b[i], my_b[i], mod_b[i*W +: W]);
      pr_bp[i] = mulmod(mx_bp[i], my_bp[i], mod_bp[i*W +: W]);
    end

    mx_r = a_r;
    my_r = b_r;
    unique case (grp)
      G_1B: begin mx_r = x_r; my_r = k1_r; end
      G_2: begin
        mx_r = sig_sel;
        my_r = '0;
        for (int unsigned t = 0; t < K; t++)
          if (cnt == CW'(t)) my_r = k2_r[t*W +: W];
      end
      G_3: begin
        mx_r = xi_sel;
        my_r = '0;
        for (int unsigned t = 0; t < K; t++)
          if (cnt == CW'(t)) my_r = k3_r[t*W +: W];
      end
      G_4: begin mx_r = x_r; my_r = k4_r; end
      default: ;
    endcase
    pr_r = mulmod(mx_r, my_r, mod_r);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      grp   <= G_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      x_r   <= '0;
      al1_r <= '0;
      alpha <= '0;
      r_r   <= '0;
      r_b   <= '0;
      r_bp  <= '0;
      for (int unsigned i = 0; i < K; i++) begin
        sig_b[i] <= '0;
        xi_bp[i] <= '0;
        rho_b[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (grp)
        G_IDLE: if (start) begin
          for (int unsigned i = 0; i < K; i++) begin
            sig_b[i] <= pr_b[i];
            xi_bp[i] <= pr_bp[i];
          end
          x_r <= pr_r;
          grp <= G_1B;
        end
        G_1B: begin
          for (int unsigned i = 0; i < K; i++) begin
            sig_b[i] <= pr_b[i];
            xi_bp[i] <= pr_bp[i];
            rho_b[i] <= '0;
          end
          x_r   <= pr_r;
          al1_r <= '0;
          cnt   <= '0;
          grp   <= G_2;
        end
        G_2: begin
          for (int unsigned i = 0; i < K; i++)
            xi_bp[i] <= addmod(xi_bp[i], pr_bp[i], mod_bp[i*W +: W]);
          x_r <= addmod(x_r, pr_r, mod_r);
          if (cnt == CW'(K - 1)) begin
            cnt <= '0;
            grp <= G_3;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        G_3: begin
          for (int unsigned i = 0; i < K; i++)
            rho_b[i] <= addmod(rho_b[i], pr_b[i], mod_b[i*W +: W]);
          al1_r <= addmod(al1_r, pr_r, mod_r);
          if (cnt == CW'(K - 1)) begin
            cnt <= '0;
            grp <= G_4;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        G_4: begin
          alpha <= submod(al1_r, pr_r, mod_r);
          for (int unsigned i = 0; i < K; i++)
            r_bp[i*W +: W] <= pr_bp[i];
          r_r <= x_r;
          grp <= G_5;
        end
        G_5: begin
          for (int unsigned i = 0; i < K; i++)
            r_b[i*W +: W] <= submod(rho_b[i], pr_b[i], mod_b[i*W +: W]);
          done <= 1'b1;
          grp  <= G_IDLE;
        end
        default: grp <= G_IDLE;
      endcase
    end
  end

  assign busy = (grp != G_IDLE);
endmodule
