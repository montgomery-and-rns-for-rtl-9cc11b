// tb_rns_exp: checks the RNS exponentiator at its default size (K = 10
// moduli per base, 7-bit residues, 512-bit exponent) against a reference.
//
// Bases: B = the primes 3..31, B' = the primes 37..73, m_r = 16. Each test
// draws an odd N below M/(K+2)^2 and coprime to all moduli, computes every
// constant and Q = M^2 mod N here, and raises a random a < N to a 512-bit
// exponent (the first three tests use e = 0, e = 1 and e = all ones). The
// result is rebuilt from its B' residues by the Chinese remainder theorem and
// must be congruent to a^e mod N and below (K+1)N; its B and m_r residues
// must match, and done must come (E + w + 3)(2K + 5) clocks after the start
// clock, w = number of one bits in e.
module tb_rns_exp;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- RNS exponentiation ----------------
  localparam int RK = 10, RW = 7, RE = 512;
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
        if (dut.u_mm.alpha != 0) n_rx_alpha++;
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

  rns_exp dut (.clk(clk), .rst(rst), .start(rx_start), .e(rx_e), .mod_b(rx_mod_b), .mod_bp(rx_mod_bp), .mod_r(rx_mod_r), .a_b(rx_a_b), .a_bp(rx_a_bp), .a_r(rx_a_r), .q_b(rx_q_b), .q_bp(rx_q_bp), .q_r(rx_q_r), .k1_b(rx_k1_b), .k1_bp(rx_k1_bp), .k1_r(rx_k1_r), .k2_bp(rx_k2_bp), .k2_r(rx_k2_r), .k3_b(rx_k3_b), .k3_r(rx_k3_r), .k4_r(rx_k4_r), .k5_b(rx_k5_b), .k5_bp(rx_k5_bp), .r_b(rx_r_b), .r_bp(rx_r_bp), .r_r(rx_r_r), .busy(rx_busy), .done(rx_done));

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    wait (rx_finished);
    checks++;
    if (n_rx_alpha == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
