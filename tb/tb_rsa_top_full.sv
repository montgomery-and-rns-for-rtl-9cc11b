// tb_rsa_top_full: rsa_top at its default size (1024-bit operands, 512-bit
// exponent, 8-bit residue channels), no parameter overrides.
//  * One complete RSA exponentiation with a random odd 1022-bit modulus,
//    checked against square-and-multiply on wide integers, and its clock
//    count (n+2)(E+3) = 1026 * 515.
//  * One 1024-bit Montgomery multiplication through the 32-bit word interface
//    (32 words in, 32 words out), run at the same time.
//  * A short multiply-accumulate sequence on both residue channels.
//  * Four RNS exponentiations with 512-bit exponents at the default 10 moduli
//    per base (B = primes 3..31, B' = primes 37..73, m_r = 16), checked as in
//    tb_rsa_top: congruent to a^e mod N, below 11N, all residues, clock count.
module tb_rsa_top_full;
  import rsa_pkg::*;
  localparam int unsigned NB = 1024;
  localparam int unsigned EB = 512;
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

  rsa_top dut (.*);

  int checks = 0, failures = 0;
  bit rsa_finished = 0, mm_finished = 0, rns_finished = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] rnd_wide();
    logic [NB-1:0] v;
    for (int i = 0; i < NB / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [NB-1:0] modexp(logic [NB-1:0] base, logic [EB-1:0] e, logic [NB-1:0] m);
    logic [2*NB-1:0] r, x;
    r = 1; x = (2*NB)'(base);
    for (int i = 0; i < EB; i++) begin
      if (e[i]) r = (r * x) % (2*NB)'(m);
      x = (x * x) % (2*NB)'(m);
    end
    return r[NB-1:0];
  endfunction

  // RSA engine
  logic [2*NB:0] kk;
  logic [NB-1:0] expv;
  int cyc;
  initial begin
    rsa_n = (rnd_wide() >> 2) | NB'(1);
    rsa_n[NB-3] = 1'b1;                      // full 1022-bit modulus
    rsa_c = rnd_wide() % rsa_n;
    for (int i = 0; i < EB / 32; i++) rsa_d[i*32 +: 32] = $urandom;
    rsa_d[EB-1] = 1'b1;
    kk = ((2*NB+1)'(1) << (2*NB)) % (2*NB+1)'(rsa_n);
    rsa_k = kk[NB-1:0];
    expv = modexp(rsa_c, rsa_d, rsa_n);
    @(negedge clk); @(negedge clk);
    rsa_start = 1; @(negedge clk); rsa_start = 0;
    cyc = 1;
    while (!rsa_done) begin @(negedge clk); cyc++; end
    checks++;
    if (rsa_m !== expv) begin failures++; $display("FAIL rsa result"); end
    checks++;
    if (cyc !== (NB + 2) * (EB + 3)) begin failures++; $display("FAIL rsa: %0d clocks", cyc); end
    $display("rsa: %0d clocks", cyc);
    rsa_finished = 1;
  end

  // Montgomery multiplier chip
  logic [NB-1:0] a1, a2, b1, b2, nm, s1, s2;
  logic [NB+1:0] a, b, res;
  logic [2*NB+3:0] lhs, rhs;
  int nout;
  initial begin
    mm_a1 = '0; mm_a2 = '0; mm_b1 = '0; mm_b2 = '0; mm_n = '0;
    nm = (rnd_wide() >> 2) | NB'(1);
    a  = {rnd_wide(), 2'b0} % (2 * nm);
    b  = {rnd_wide(), 2'b0} % (2 * nm);
    a1 = rnd_wide() & a[NB-1:0]; a2 = a[NB-1:0] - a1;
    b1 = rnd_wide() & b[NB-1:0]; b2 = b[NB-1:0] - b1;
    @(negedge clk); @(negedge clk);
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
    if (lhs !== rhs || nout !== WORDS || res >= 2 * nm) begin failures++; $display("FAIL mm"); end
    mm_finished = 1;
  end

  // residue channels
  int sum_m, sum_p, km, kp;
  logic [63:0] xv;
  initial begin
    rns_x = '0; rns_km = '0; rns_dkp = 9'h100;
    sum_m = 0; sum_p = 0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 500; t++) begin
      xv = {$urandom, $urandom} & 64'hFFFF_FFFF_FFFF;
      km = $urandom % 256;
      kp = $urandom % 257;
      rns_x = xv[6*RN-1:0];
      rns_km = RN'(km);
      rns_dkp = (kp == 0) ? 9'h100 : 9'(kp - 1);
      @(negedge clk);
      sum_m = (sum_m + int'((xv % 255) * km % 255)) % 255;
      sum_p = (sum_p + int'((xv % 257) * kp % 257)) % 257;
      if (sum_p == 256) sum_p = 0;
      checks++;
      if (int'(rns_acc_m) % 255 !== sum_m) failures++;
      checks++;
      if (int'(rns_acc_p) !== sum_p) failures++;
    end
    rns_x = '0;
    rns_finished = 1;
  end

  // ---------------- RNS exponentiation ----------------
  localparam int RK = 10, RW = 7, RE = EB;
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
  int unsigned rq_mb[RK] = '{3, 5, 7, 11, 13, 17, 19, 23, 29, 31};
  int unsigned rq_mbp[RK] = '{37, 41, 43, 47, 53, 59, 61, 67, 71, 73};
  int unsigned rq_mr = 16;
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
    for (int t = 0; t < 4; t++) begin
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
