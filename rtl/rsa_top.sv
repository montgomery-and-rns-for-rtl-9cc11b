// rsa_top: the two RSA arithmetic engines side by side.
//
// 1. Montgomery engine (rsa_mont): full RSA exponentiation M = c^d mod N on
//    n-bit operands with two five-to-two carry-save Montgomery multipliers and
//    a bit-serial final adder; wide parallel ports.
// 2. Montgomery multiplier chip (mont_io): one multiplication a*b*2^-n mod N
//    with 32-bit word-serial input and output registers.
// 3. Residue (RNS) arithmetic channels, one for a modulus 2^r - 1 and one for
//    2^r + 1 (r = RNS_N). In each, a binary operand of six r-bit blocks is
//    reduced by the converter, multiplied by a per-clock coefficient and the
//    product accumulated by the modular adder, i.e. one channel of a
//    sum_i (x_i * K_i) mod m step as used by the RNS base extensions. The
//    2^r + 1 channel works in diminished-1 form: the coefficient is given as
//    d(K) = K - 1 (bit r set for K = 0) and the accumulator reads out in
//    ordinary binary. rns_clear clears both accumulators.
// 4. RNS exponentiator (rns_exp around the RNS Montgomery multiplier rns_mm):
//    a^e mod N on residues in two bases of RNS_K moduli each plus a redundant
//    power-of-two modulus, E_BITS-bit exponent, 2*RNS_K+5 clocks per
//    multiplication. Moduli and constants come in on rx_* ports from a
//    host-written store (layout in rns_mm); the result is left in residue
//    form, below (RNS_K+1)N.
//
// All blocks share clk and a synchronous active-high rst. Timing of each part
// is described in its own module.
module rsa_top
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  parameter int unsigned E_BITS = 512,
  parameter int unsigned RNS_N  = 8,
  parameter int unsigned RNS_K  = 10,
  parameter int unsigned RNS_W  = 7
) (
  input  logic              clk,
  input  logic              rst,
  // Montgomery RSA engine
  input  logic              rsa_start,
  input  logic [N_BITS-1:0] rsa_c,
  input  logic [E_BITS-1:0] rsa_d,
  input  logic [N_BITS-1:0] rsa_n,
  input  logic [N_BITS-1:0] rsa_k,
  output logic [N_BITS-1:0] rsa_m,
  output logic              rsa_busy,
  output logic              rsa_done,
  output mont_phase_e       rsa_phase,
  // Montgomery multiplier with 32-bit I/O
  input  logic              mm_in_valid,
  input  logic [IO_W-1:0]   mm_a1,
  input  logic [IO_W-1:0]   mm_a2,
  input  logic [IO_W-1:0]   mm_b1,
  input  logic [IO_W-1:0]   mm_b2,
  input  logic [IO_W-1:0]   mm_n,
  output logic              mm_out_valid,
  output logic              mm_out_last,
  output logic [IO_W-1:0]   mm_s1,
  output logic [IO_W-1:0]   mm_s2,
  output logic              mm_busy,
  // RNS channels
  input  logic              rns_clear,
  input  logic [6*RNS_N-1:0] rns_x,
  input  logic [RNS_N-1:0]  rns_km,     // coefficient, residue mod 2^r - 1
  input  logic [RNS_N:0]    rns_dkp,    // coefficient, diminished-1 mod 2^r + 1
  output logic [RNS_N-1:0]  rns_acc_m,  // accumulated sum mod 2^r - 1
  output logic [RNS_N-1:0]  rns_acc_p,  // accumulated sum mod 2^r + 1 (binary)
  output logic [RNS_N:0]    rns_dxp,    // diminished-1 residue of rns_x mod 2^r + 1
  // RNS exponentiator (names as the rns_exp ports)
  input  logic                      rx_start,
  input  logic [E_BITS-1:0]         rx_e,
  input  logic [RNS_K*RNS_W-1:0]    rx_mod_b,
  input  logic [RNS_K*RNS_W-1:0]    rx_mod_bp,
  input  logic [RNS_W-1:0]          rx_mod_r,
  input  logic [RNS_K*RNS_W-1:0]    rx_a_b,
  input  logic [RNS_K*RNS_W-1:0]    rx_a_bp,
  input  logic [RNS_W-1:0]          rx_a_r,
  input  logic [RNS_K*RNS_W-1:0]    rx_q_b,
  input  logic [RNS_K*RNS_W-1:0]    rx_q_bp,
  input  logic [RNS_W-1:0]          rx_q_r,
  input  logic [RNS_K*RNS_W-1:0]    rx_k1_b,
  input  logic [RNS_K*RNS_W-1:0]    rx_k1_bp,
  input  logic [RNS_W-1:0]          rx_k1_r,
  input  logic [RNS_K*RNS_K*RNS_W-1:0] rx_k2_bp,
  input  logic [RNS_K*RNS_W-1:0]    rx_k2_r,
  input  logic [RNS_K*RNS_K*RNS_W-1:0] rx_k3_b,
  input  logic [RNS_K*RNS_W-1:0]    rx_k3_r,
  input  logic [RNS_W-1:0]          rx_k4_r,
  input  logic [RNS_K*RNS_W-1:0]    rx_k5_b,
  input  logic [RNS_K*RNS_W-1:0]    rx_k5_bp,
  output logic [RNS_K*RNS_W-1:0]    rx_r_b,
  output logic [RNS_K*RNS_W-1:0]    rx_r_bp,
  output logic [RNS_W-1:0]          rx_r_r,
  output logic                      rx_busy,
  output logic                      rx_done
);
  rsa_mont #(.N_BITS(N_BITS), .E_BITS(E_BITS)) u_rsa (
    .clk(clk), .rst(rst), .start(rsa_start),
    .c_in(rsa_c), .d_in(rsa_d), .n_mod(rsa_n), .k_const(rsa_k),
    .m_out(rsa_m), .busy(rsa_busy), .done(rsa_done), .phase(rsa_phase)
  );

  mont_io #(.N_BITS(N_BITS)) u_mm (
    .clk(clk), .rst(rst), .in_valid(mm_in_valid),
    .a1_w(mm_a1), .a2_w(mm_a2), .b1_w(mm_b1), .b2_w(mm_b2), .n_w(mm_n),
    .out_valid(mm_out_valid), .out_last(mm_out_last),
    .s1_w(mm_s1), .s2_w(mm_s2), .busy(mm_busy)
  );

  logic              acc_rst;
  logic [RNS_N-1:0]  xm, pm;
  logic [RNS_N:0]    dpp;

  assign acc_rst = rst | rns_clear;

  conv_mod2n_m1 #(.N(RNS_N)) u_conv_m (.x(rns_x), .r(xm));
  mul_mod2n_m1  #(.N(RNS_N)) u_mul_m  (.a(xm), .b(rns_km), .p(pm));
  add_mod2n_m1  #(.N(RNS_N)) u_add_m  (.clk(clk), .rst(acc_rst), .din(pm), .acc(rns_acc_m));

  conv_dim1_p1  #(.N(RNS_N)) u_conv_p (.x(rns_x), .dr(rns_dxp));
  mul_mod2n_p1  #(.N(RNS_N)) u_mul_p  (.da(rns_dxp), .db(rns_dkp), .dp(dpp));
  add_mod2n_p1  #(.N(RNS_N)) u_add_p  (.clk(clk), .rst(acc_rst), .din(dpp), .acc(rns_acc_p));

  rns_exp #(.K(RNS_K), .W(RNS_W), .E_BITS(E_BITS)) u_rx (
    .clk(clk), .rst(rst), .start(rx_start), .e(rx_e), .mod_b(rx_mod_b),
    .mod_bp(rx_mod_bp), .mod_r(rx_mod_r), .a_b(rx_a_b), .a_bp(rx_a_bp),
    .a_r(rx_a_r), .q_b(rx_q_b), .q_bp(rx_q_bp), .q_r(rx_q_r), .k1_b(rx_k1_b),
    .k1_bp(rx_k1_bp), .k1_r(rx_k1_r), .k2_bp(rx_k2_bp), .k2_r(rx_k2_r),
    .k3_b(rx_k3_b), .k3_r(rx_k3_r), .k4_r(rx_k4_r), .k5_b(rx_k5_b),
    .k5_bp(rx_k5_bp), .r_b(rx_r_b), .r_bp(rx_r_bp), .r_r(rx_r_r),
    .busy(rx_busy), .done(rx_done)
  );
endmodule
