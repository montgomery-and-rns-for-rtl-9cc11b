// tb_rsa_top: end-to-end test of rsa_top at reduced size (64-bit operands,
// 16-bit exponents, 8-bit residue channels). Runs, in parallel:
//  * several RSA exponentiations on the Montgomery engine, checked against
//    square-and-multiply on wide integers, with the (n+2)(E+3) clock count;
//  * Montgomery multiplications through the 32-bit word interface;
//  * multiply-accumulate sequences on both residue channels, checked against
//    sum(x_t * K_t) mod 255 and mod 257;
//  * RNS exponentiations with 3 moduli per base (B = 101, 103, 107;
//    B' = 109, 113, 127; m_r = 4) and 16-bit exponents (e = 0, 1, all ones,
//    then random): all constants are computed here, the result is rebuilt
//    from its B' residues and must be congruent to a^e mod N and below 4N,
//    its other residues must match, and the run must take (E+w+3)(2K+5)
//    clocks after the start clock (w = one bits in e).
// Counts how often each mechanism occurred and fails if one never did: R
// update taken / skipped (exponent bit 1 / 0), each exponentiation phase,
// word-serial load and unload, diminished-1 zero operand (adder holds),
// accumulator clear, the 2^n+1 accumulator wrap at 256, RNS exponentiations,
// RNS exponent bits 1 and 0, and a nonzero second-base-extension correction
// alpha.
module tb_rsa_top;
  import rsa_pkg::*;
  localparam int unsigned NB = 64;
  localparam int unsigned EB = 16;
  localparam int unsigned RN = 8;
  localparam int unsigned WORDS = NB / IO_W;

  logic clk = 0, rst = 1;
  logic rsa_start = 0;
  logic [NB-1:0] rsa_c, rsa_n, rsa_k, rsa_m;
  logic [EB-1:0] rsa_d;
  logic rsa_busy, rsa_done;
  mont_phase_e rsa_phase;
  logic mm_in_valid = 0;
  logic [IO_W-1:0] mm_a1, mm_a2, mm_b1, mm_b2, mm_n, mm_s1, mm_s2;
  logic mm_out_valid, mm_out_last, mm_busy;
  logic rns_clear = 0;
  logic [6*RN-1:0] rns_x;
  logic [RN-1:0] rns_km, rns_acc_m, rns_acc_p;
  logic [RN:0] rns_dkp, rns_dxp;

  rsa_top #(.N_BITS(NB), .E_BITS(EB), .RNS_N(RN), .RNS_K(3), .RNS_W(7)) dut (.*);

  int checks = 0, failures = 0;
  int n_r_taken = 0, n_r_skipped = 0, n_mm_ops = 0, n_zero_hold = 0, n_clear = 0, n_wrap = 0;
  int seen [5] = '{0, 0, 0, 0, 0};
  bit rsa_finished = 0, mm_finished = 0, rns_finished = 0;

  always #5 clk = ~clk;
  always @(posedge clk) seen[rsa_phase]++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] modexp(logic [NB-1:0] base, logic [EB-1:0] e, logic [NB-1:0] m);
    logic [2*NB-1:0] r, x;
    r = 1; x = base;
    for (int i = 0; i < EB; i++) begin
      if (e[i]) r = (r * x) % m;
      x = (x * x) % m;
    end
    return r[NB-1:0] % m;
  endfunction

  // ---------------- RSA engine ----------------
  logic [2*NB:0] kk;
  logic [NB-1:0] expv;
  int cyc;
  initial begin
    rsa_c = '0; rsa_d = '0; rsa_n = 64'd3; rsa_k = '0;
    @(negedge clk); @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      rsa_n = ({$urandom, $urandom} >> 2) | 64'h1;
      rsa_c = {$urandom, $urandom} % rsa_n;
      rsa_d = EB'($urandom);
      kk = ((2*NB+1)'(1) << (2*NB)) % (2*NB+1)'(rsa_n);
      rsa_k = kk[NB-1:0];
      expv = modexp(rsa_c, rsa_d, rsa_n);
      for (int i = 0; i < EB; i++) if (rsa_d[i]) n_r_taken++; else n_r_skipped++;
      rsa_start = 1; @(negedge clk); rsa_start = 0;
      cyc = 1;
      while (!rsa_done) begin @(negedge clk); cyc++; end
      checks++;
      if (rsa_m !== expv) begin failures++; $display("FAIL rsa t=%0d got %h exp %h", t, rsa_m, expv); end
      checks++;
      if (cyc !== (NB + 2) * (EB + 3)) begin failures++; $display("FAIL rsa t=%0d: %0d clocks", t, cyc); end
    end
    rsa_finished = 1;
  end

  // ---------------- Montgomery multiplier chip ----------------
  logic [NB-1:0] a1, a2, b1, b2, nm, s1, s2;
  logic [NB+1:0] a, b, res;
  logic [2*NB+3:0] lhs, rhs;
  int nout;
  initial begin
    mm_a1 = '0; mm_a2 = '0; mm_b1 = '0; mm_b2 = '0; mm_n = '0;
    @(negedge clk); @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      nm = ({$urandom, $urandom} >> 2) | 64'h1;
      a  = {$urandom, $urandom, 2'b0} % (2 * nm);
      b  = {$urandom, $urandom, 2'b0} % (2 * nm);
      a1 = {$urandom, $urandom} & a[NB-1:0]; a2 = a[NB-1:0] - a1;
      b1 = {$urandom, $urandom} & b[NB-1:0]; b2 = b[NB-1:0] - b1;
      for (int w = 0; w < WORDS; w++) begin
        mm_in_valid = 1;
        mm_a1 = a1[w*IO_W +: IO_W]; mm_a2 = a2[w*IO_W +: IO_W];
        mm_b1 = b1[w*IO_W +: IO_W]; mm_b2 = b2[w*IO_W +: IO_W];
        mm_n  = nm[w*IO_W +: IO_W];
        @(negedge clk);
      end
      mm_in_valid = 0;
      while (!mm_out_valid) @(negedge clk);
      nout = 0;
      while (mm_out_valid) begin
        s1[nout*IO_W +: IO_W] = mm_s1;
        s2[nout*IO_W +: IO_W] = mm_s2;
        nout++;
        @(negedge clk);
      end
      res = (NB+2)'(s1) + (NB+2)'(s2);
      lhs = ((2*NB+4)'(res) << NB) % (2*NB+4)'(nm);
      rhs = ((2*NB+4)'(a) * (2*NB+4)'(b)) % (2*NB+4)'(nm);
      checks++;
      if (lhs !== rhs || nout !== WORDS) begin failures++; $display("FAIL mm t=%0d", t); end
      n_mm_ops++;
    end
    mm_finished = 1;
  end

  // ---------------- residue channels ----------------
  int sum_m, sum_p, km, kp;
  logic [63:0] xv;
  initial begin
    rns_x = '0; rns_km = '0; rns_dkp = 9'h100;
    sum_m = 0; sum_p = 0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      if (t % 1000 == 999) begin
        rns_x = '0; rns_clear = 1; @(negedge clk); rns_clear = 0;
        sum_m = 0; sum_p = 0; n_clear++;
        checks++;
        if (rns_acc_m !== 0 || rns_acc_p !== 0) failures++;
      end
      xv = {$urandom, $urandom} & 64'hFFFF_FFFF_FFFF;
      if ($urandom % 10 == 0) xv = 64'd257 * ($urandom % 100000);
      km = $urandom % 256;
      kp = $urandom % 257;
      if ($urandom % 10 == 0) kp = 0;
      rns_x = xv[6*RN-1:0];
      rns_km = RN'(km);
      rns_dkp = (kp == 0) ? 9'h100 : 9'(kp - 1);
      @(negedge clk);
      sum_m = (sum_m + int'((xv % 255) * km % 255)) % 255;
      if ((xv % 257) * kp % 257 == 0) n_zero_hold++;
      sum_p = (sum_p + int'((xv % 257) * kp % 257)) % 257;
      if (sum_p == 256) begin sum_p = 0; n_wrap++; end
      checks++;
      if (int'(rns_acc_m) % 255 !== sum_m) begin failures++; $display("FAIL rns m t=%0d", t); end
      checks++;
      if (int'(rns_acc_p) !== sum_p) begin failures++; $display("FAIL rns p t=%0d", t); end
    end
    rns_x = '0;
    rns_finished = 1;
  end

  // ---------------- RNS exponentiation ----------------
  localparam int RK = 3, RW = 7, RE = EB;
  typedef logic [127:0] u128;
  logic rx_start = 0;
  logic [RE-1:0] rx_e;
  logic [RK*RW-1:0] rx_mod_b, rx_mod_bp, rx_a_b, rx_a_bp, rx_q_b, rx_q_bp;
  logic [RK*RW-1:0] rx_k1_b, rx_k1_bp, rx_k2_r, rx_k3_r, rx_k5_b, rx_k5_bp;
  logic [RK*RW-1:0] rx_r_b, rx_r_bp;
  logic [RK*RK*RW-1:0] rx_k2_bp, rx_k3_b;
  logic [RW-1:0] rx_mod_r, rx_a_r, rx_q_r, rx_k1_r, rx_k4_r, rx_r_r;
  logic rx_busy, rx_done;
  bit rx_finished = 0;
  int unsigned rq_mb[RK] = '{101, 103, 107};
  int unsigned rq_mbp[RK] = '{109, 113, 127};
  int unsigned rq_mr = 4;
  u128 rq_m, rq_mp, rq_n, rq_a, rq_q, rq_r, rq_x;
  int rq_cyc, rq_w, n_rx_ops = 0, n_rx_bit1 = 0, n_rx_bit0 = 0, n_rx_alpha = 0;

  function automatic int unsigned rq_inv(int unsigned x, int unsigned m);
    for (int unsigned t = 1; t < m; t++) if ((x * t) % m == 1) return t;
    return 0;
  endfunction

  function automatic int unsigned rq_rd(u128 x, int unsigned m);
    return int'(x % u128'(m));
  endfunction

  function automatic u128 rq_rand(u128 lim);
    u128 v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v % lim;
  endfunction

  // moduli and every constant for modulus rq_n
  task automatic rq_constants();
    int unsigned mi, mj, ni, mii;
    rx_mod_r = RW'(rq_mr);
    for (int i = 0; i < RK; i++) begin
      rx_mod_b[i*RW +: RW] = RW'(rq_mb[i]);
      rx_mod_bp[i*RW +: RW] = RW'(rq_mbp[i]);
    end
    rx_k1_r = RW'(rq_inv(rq_rd(rq_m, rq_mr), rq_mr));
    rx_k4_r = RW'(rq_inv(rq_rd(rq_mp, rq_mr), rq_mr));
    for (int i = 0; i < RK; i++) begin
      mi = rq_mb[i];
      ni = rq_inv(rq_rd(rq_n, mi), mi);
      mii = rq_inv(rq_rd(rq_m / u128'(mi), mi), mi);
      rx_k1_b[i*RW +: RW] = RW'(((mi - ni) % mi) * mii % mi);
      rx_k5_b[i*RW +: RW] = RW'(rq_rd(rq_mp, mi));
      for (int j = 0; j < RK; j++)
        rx_k3_b[(i*RK+j)*RW +: RW] = RW'(rq_rd(rq_mp / u128'(rq_mbp[j]), mi));
      rx_k2_r[i*RW +: RW] = RW'(rq_rd(rq_m / u128'(mi), rq_mr) * rq_rd(rq_n, rq_mr) % rq_mr
                                * rq_inv(rq_rd(rq_m, rq_mr), rq_mr) % rq_mr);
    end
    for (int j = 0; j < RK; j++) begin
      mj = rq_mbp[j];
      rx_k1_bp[j*RW +: RW] = RW'(rq_inv(rq_rd(rq_m, mj), mj) * rq_inv(rq_rd(rq_mp / u128'(mj), mj), mj) % mj);
      rx_k5_bp[j*RW +: RW] = RW'(rq_rd(rq_mp / u128'(mj), mj));
      rx_k3_r[j*RW +: RW] = RW'(rq_inv(rq_rd(rq_mp, rq_mr), rq_mr) * rq_rd(rq_mp / u128'(mj), rq_mr) % rq_mr);
      for (int i = 0; i < RK; i++)
        rx_k2_bp[(j*RK+i)*RW +: RW] = RW'(rq_rd(rq_m / u128'(rq_mb[i]), mj) * rq_rd(rq_n, mj) % mj
                                          * rq_inv(rq_rd(rq_m, mj), mj) % mj
                                          * rq_inv(rq_rd(rq_mp / u128'(mj), mj), mj) % mj);
    end
    // Q = M^2 mod N
    rq_q = ((rq_m % rq_n) * (rq_m % rq_n)) % rq_n;
    for (int i = 0; i < RK; i++) begin
      rx_q_b[i*RW +: RW] = RW'(rq_rd(rq_q, rq_mb[i]));
      rx_q_bp[i*RW +: RW] = RW'(rq_rd(rq_q, rq_mbp[i]));
    end
    rx_q_r = RW'(rq_rd(rq_q, rq_mr));
  endtask

  task automatic rq_pick_n();
    bit ok;
    do begin
      rq_n = rq_rand(rq_m / u128'((RK + 2) * (RK + 2)));
      rq_n[0] = 1'b1;
      ok = (rq_n > 1);
      for (int i = 0; i < RK; i++)
        if (rq_rd(rq_n, rq_mb[i]) == 0 || rq_rd(rq_n, rq_mbp[i]) == 0) ok = 0;
    end while (!ok);
  endtask

  function automatic u128 rq_modexp(u128 bs, logic [RE-1:0] ex, u128 m);
    u128 r;
    r = 1 % m;
    for (int i = RE - 1; i >= 0; i--) begin
      r = (r * r) % m;
      if (ex[i]) r = (r * bs) % m;
    end
    return r;
  endfunction

  initial begin
    rq_m = 1; rq_mp = 1;
    for (int i = 0; i < RK; i++) begin
      rq_m = rq_m * u128'(rq_mb[i]);
      rq_mp = rq_mp * u128'(rq_mbp[i]);
    end
    {rx_a_b, rx_a_bp, rx_a_r} = '0;
    rx_e = '0;
    rq_pick_n();
    rq_constants();
    repeat (3) @(negedge clk);
    for (int t = 0; t < 12; t++) begin
      rq_pick_n();
      rq_constants();
      rq_a = rq_rand(rq_n);
      for (int i = 0; i < RE; i++) rx_e[i] = 1'($urandom);
      if (t == 0) rx_e = '0;
      if (t == 1) rx_e = RE'(1);
      if (t == 2) rx_e = '1;
      for (int i = 0; i < RK; i++) begin
        rx_a_b[i*RW +: RW] = RW'(rq_rd(rq_a, rq_mb[i]));
        rx_a_bp[i*RW +: RW] = RW'(rq_rd(rq_a, rq_mbp[i]));
      end
      rx_a_r = RW'(rq_rd(rq_a, rq_mr));
      rq_w = 0;
      for (int i = 0; i < RE; i++) if (rx_e[i]) rq_w++;
      n_rx_bit1 += rq_w;
      n_rx_bit0 += RE - rq_w;
      rq_x = rq_modexp(rq_a, rx_e, rq_n);
      rx_start = 1;
      @(negedge clk);
      rx_start = 0;
      rq_cyc = 1;
      while (!rx_done) begin
        @(negedge clk);
        rq_cyc++;
        if (dut.u_rx.u_mm.alpha != 0) n_rx_alpha++;
      end
      n_rx_ops++;
      rq_r = 0;
      for (int j = 0; j < RK; j++)
        rq_r = (rq_r + u128'(int'(rx_r_bp[j*RW +: RW]) * rq_inv(rq_rd(rq_mp / u128'(rq_mbp[j]), rq_mbp[j]), rq_mbp[j])
                % rq_mbp[j]) * (rq_mp / u128'(rq_mbp[j]))) % rq_mp;
      checks++;
      if (rq_cyc !== (RE + rq_w + 3) * (2 * RK + 5) + 1) begin
        failures++; $display("FAIL rns_exp t=%0d: %0d clocks", t, rq_cyc);
      end
      checks++;
      if (rq_r % rq_n !== rq_x || rq_r >= u128'(RK + 1) * rq_n) begin
        failures++; $display("FAIL rns_exp t=%0d result", t);
      end
      for (int i = 0; i < RK; i++) begin
        checks++;
        if (int'(rx_r_b[i*RW +: RW]) !== rq_rd(rq_r, rq_mb[i])) begin
          failures++; $display("FAIL rns_exp t=%0d residue %0d", t, i);
        end
      end
      checks++;
      if (int'(rx_r_r) !== rq_rd(rq_r, rq_mr)) failures++;
    end
    rx_finished = 1;
  end

  initial begin
    wait (rsa_finished && mm_finished && rns_finished && rx_finished);
    for (int p = 1; p < 5; p++) begin
      checks++;
      if (seen[p] == 0) begin failures++; $display("FAIL phase %0d never entered", p); end
    end
    $display("mechanisms: r_taken=%0d r_skipped=%0d mm_ops=%0d zero_hold=%0d clear=%0d wrap=%0d rns_exp=%0d rns_bit1=%0d rns_bit0=%0d alpha_nonzero=%0d",
             n_r_taken, n_r_skipped, n_mm_ops, n_zero_hold, n_clear, n_wrap,
             n_rx_ops, n_rx_bit1, n_rx_bit0, n_rx_alpha);
    checks++; if (n_r_taken == 0)   failures++;
    checks++; if (n_r_skipped == 0) failures++;
    checks++; if (n_mm_ops == 0)    failures++;
    checks++; if (n_zero_hold == 0) failures++;
    checks++; if (n_clear == 0)     failures++;
    checks++; if (n_wrap == 0)      failures++;
    checks++; if (n_rx_ops == 0)    failures++;
    checks++; if (n_rx_bit1 == 0)   failures++;
    checks++; if (n_rx_bit0 == 0)   failures++;
    checks++; if (n_rx_alpha == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
