// tb_rns_mm: checks the RNS Montgomery multiplier at its default size
// (K = 10 moduli per base, 7-bit residues) against a reference model.
//
// Bases: B = the primes 3..31, B' = the primes 37..73, m_r = 16. For each
// test an odd N below M/(K+2)^2 and coprime to all moduli is drawn, every
// constant is computed here from N and the moduli, and a, b below (K+2)N are
// given as residues. The result r is rebuilt from its B' residues by the
// Chinese remainder theorem and must satisfy r*M = a*b (mod N) and
// r < (K+1)N; its B and m_r residues must equal r mod m. Every fourth test
// feeds the previous result back as both operands, as an exponentiation
// would. The clock count from start to done (2K+4 clocks) is checked too.
module tb_rns_mm;
  localparam int K = 10, W = 7;
  typedef logic [127:0] u128;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [K*W-1:0] mod_b, mod_bp, a_b, a_bp, b_b, b_bp, k1_b, k1_bp;
  logic [K*W-1:0] k2_r, k3_r, k5_b, k5_bp, r_b, r_bp;
  logic [K*K*W-1:0] k2_bp, k3_b;
  logic [W-1:0] mod_r, a_r, b_r, k1_r, k4_r, r_r;
  logic busy, done;

  rns_mm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned mb[K] = '{3, 5, 7, 11, 13, 17, 19, 23, 29, 31};
  int unsigned mbp[K] = '{37, 41, 43, 47, 53, 59, 61, 67, 71, 73};
  int unsigned mr = 16;
  u128 bm, bmp, nn, av, bv, rv, prev_r;
  int cyc;

  function automatic int unsigned inv(int unsigned x, int unsigned m);
    for (int unsigned t = 1; t < m; t++) if ((x * t) % m == 1) return t;
    return 0;
  endfunction

  function automatic int unsigned rd(u128 x, int unsigned m);
    return int'(x % u128'(m));
  endfunction

  function automatic u128 rand128(u128 lim);
    u128 v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v % lim;
  endfunction

  // All constants for modulus N
  task automatic set_constants();
    int unsigned mi, mj, ni, mii;
    mod_r = W'(mr);
    for (int i = 0; i < K; i++) begin
      mod_b[i*W +: W] = W'(mb[i]);
      mod_bp[i*W +: W] = W'(mbp[i]);
    end
    k1_r = W'(inv(rd(bm, mr), mr));
    k4_r = W'(inv(rd(bmp, mr), mr));
    for (int i = 0; i < K; i++) begin
      mi = mb[i];
      ni = inv(rd(nn, mi), mi);
      mii = inv(rd(bm / mi, mi), mi);
      k1_b[i*W +: W] = W'(((mi - ni) % mi) * mii % mi);
      k5_b[i*W +: W] = W'(rd(bmp, mi));
      for (int j = 0; j < K; j++)
        k3_b[(i*K+j)*W +: W] = W'(rd(bmp / mbp[j], mi));
      k2_r[i*W +: W] = W'(rd(bm / mi, mr) * rd(nn, mr) % mr * inv(rd(bm, mr), mr) % mr);
    end
    for (int j = 0; j < K; j++) begin
      mj = mbp[j];
      k1_bp[j*W +: W] = W'(inv(rd(bm, mj), mj) * inv(rd(bmp / mj, mj), mj) % mj);
      k5_bp[j*W +: W] = W'(rd(bmp / mj, mj));
      k3_r[j*W +: W] = W'(inv(rd(bmp, mr), mr) * rd(bmp / mj, mr) % mr);
      for (int i = 0; i < K; i++)
        k2_bp[(j*K+i)*W +: W] = W'(rd(bm / mb[i], mj) * rd(nn, mj) % mj
                                   * inv(rd(bm, mj), mj) % mj
                                   * inv(rd(bmp / mj, mj), mj) % mj);
    end
  endtask

  task automatic pick_n();
    bit ok;
    do begin
      nn = rand128(bm / u128'((K + 2) * (K + 2)));
      nn[0] = 1'b1;
      ok = (nn > 1);
      for (int i = 0; i < K; i++) if (rd(nn, mb[i]) == 0 || rd(nn, mbp[i]) == 0) ok = 0;
    end while (!ok);
  endtask

  initial begin
    bm = 1; bmp = 1;
    for (int i = 0; i < K; i++) begin
      bm = bm * u128'(mb[i]);
      bmp = bmp * u128'(mbp[i]);
    end
    prev_r = 0;
    {a_b, a_bp, b_b, b_bp, a_r, b_r} = '0;
    pick_n();
    set_constants();
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      if (t % 20 == 0) begin
        pick_n();
        set_constants();
      end
      if (t % 4 == 3) begin
        av = prev_r; bv = prev_r;
      end else begin
        av = rand128(u128'(K + 2) * nn);
        bv = rand128(u128'(K + 2) * nn);
      end
      for (int i = 0; i < K; i++) begin
        a_b[i*W +: W] = W'(rd(av, mb[i]));
        b_b[i*W +: W] = W'(rd(bv, mb[i]));
        a_bp[i*W +: W] = W'(rd(av, mbp[i]));
        b_bp[i*W +: W] = W'(rd(bv, mbp[i]));
      end
      a_r = W'(rd(av, mr));
      b_r = W'(rd(bv, mr));
      start = 1;
      @(posedge clk);
      cyc = 1;
      #1 start = 0;
      while (!done) begin
        @(posedge clk);
        cyc++;
        #1;
      end
      checks++;
      if (cyc !== 2 * K + 4) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d clocks %0d", t, cyc);
      end
      // rebuild r from the B' residues
      rv = 0;
      for (int j = 0; j < K; j++)
        rv = (rv + u128'(int'(r_bp[j*W +: W]) * inv(rd(bmp / mbp[j], mbp[j]), mbp[j])
              % mbp[j]) * (bmp / mbp[j])) % bmp;
      checks++;
      if ((rv * bm) % nn !== (av * bv) % nn) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d congruence", t);
      end
      checks++;
      if (rv >= u128'(K + 1) * nn) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d r not below (K+1)N", t);
      end
      for (int i = 0; i < K; i++) begin
        checks++;
        if (int'(r_b[i*W +: W]) !== rd(rv, mb[i])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d r mod m_%0d", t, i);
        end
      end
      checks++;
      if (int'(r_r) !== rd(rv, mr)) failures++;
      prev_r = rv;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
