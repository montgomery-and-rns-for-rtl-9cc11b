// tb_rsa_workloads: RSA exponentiation at the two published operand sizes with
// full-length moduli. A modulus of k bits needs a (k+2)-bit datapath, so the
// engine is instantiated as
//   RSA-1024: N_BITS = 1026, E_BITS = 512, modulus with bit 1023 set
//   RSA-512 : N_BITS = 514,  E_BITS = 256, modulus with bit 511 set
// Both run at the same time; results are checked against square-and-multiply
// on wide integers and the clock counts against (n+2)(E+3).
module tb_rsa_workloads;
  import rsa_pkg::*;
  localparam int unsigned NA = 1026, EA = 512;
  localparam int unsigned NB = 514,  EB = 256;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  bit fin_a = 0, fin_b = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- RSA-1024 ----------------
  logic st_a = 0, busy_a, done_a;
  logic [NA-1:0] c_a, n_a, k_a, m_a;
  logic [EA-1:0] d_a;
  mont_phase_e ph_a;
  rsa_mont #(.N_BITS(NA), .E_BITS(EA)) u_a (.clk(clk), .rst(rst), .start(st_a),
    .c_in(c_a), .d_in(d_a), .n_mod(n_a), .k_const(k_a), .m_out(m_a),
    .busy(busy_a), .done(done_a), .phase(ph_a));

  // ---------------- RSA-512 ----------------
  logic st_b = 0, busy_b, done_b;
  logic [NB-1:0] c_b, n_b, k_b, m_b;
  logic [EB-1:0] d_b;
  mont_phase_e ph_b;
  rsa_mont #(.N_BITS(NB), .E_BITS(EB)) u_b (.clk(clk), .rst(rst), .start(st_b),
    .c_in(c_b), .d_in(d_b), .n_mod(n_b), .k_const(k_b), .m_out(m_b),
    .busy(busy_b), .done(done_b), .phase(ph_b));

  function automatic logic [2047:0] modexp(logic [2047:0] base, logic [2047:0] e, int ebits,
                                           logic [2047:0] m);
    logic [4095:0] r, x;
    r = 1; x = 4096'(base);
    for (int i = 0; i < ebits; i++) begin
      if (e[i]) r = (r * x) % 4096'(m);
      x = (x * x) % 4096'(m);
    end
    return r[2047:0];
  endfunction

  function automatic logic [2047:0] rnd_bits(int bits);
    logic [2047:0] v;
    v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom;
    return v & ((2048'(1) << bits) - 1);
  endfunction

  function automatic logic [2047:0] k_of(logic [2047:0] m, int n);
    logic [4095:0] p;
    p = (4096'(1) << (2 * n)) % 4096'(m);
    return p[2047:0];
  endfunction

  logic [2047:0] ea, eb, t;
  int cyc_a, cyc_b;

  initial begin
    t = rnd_bits(1024); t[1023] = 1'b1; t[0] = 1'b1;
    n_a = NA'(t);
    c_a = NA'(rnd_bits(1024) % t);
    d_a = EA'(rnd_bits(EA)); d_a[EA-1] = 1'b1;
    k_a = NA'(k_of(t, NA));
    ea  = modexp(2048'(c_a), 2048'(d_a), EA, t);
    @(negedge clk); rst = 0; @(negedge clk);
    st_a = 1; @(negedge clk); st_a = 0;
    cyc_a = 1;
    while (!done_a) begin @(negedge clk); cyc_a++; end
    checks++;
    if (2048'(m_a) !== ea) begin failures++; $display("FAIL RSA-1024 result"); end
    checks++;
    if (cyc_a !== (NA + 2) * (EA + 3)) begin failures++; $display("FAIL RSA-1024: %0d clocks", cyc_a); end
    $display("RSA-1024 (N_BITS=%0d): %0d clocks", NA, cyc_a);
    fin_a = 1;
  end

  initial begin
    logic [2047:0] tb;
    tb = rnd_bits(512); tb[511] = 1'b1; tb[0] = 1'b1;
    n_b = NB'(tb);
    c_b = NB'(rnd_bits(512) % tb);
    d_b = EB'(rnd_bits(EB)); d_b[EB-1] = 1'b1;
    k_b = NB'(k_of(tb, NB));
    eb  = modexp(2048'(c_b), 2048'(d_b), EB, tb);
    @(negedge clk); @(negedge clk);
    st_b = 1; @(negedge clk); st_b = 0;
    cyc_b = 1;
    while (!done_b) begin @(negedge clk); cyc_b++; end
    checks++;
    if (2048'(m_b) !== eb) begin failures++; $display("FAIL RSA-512 result"); end
    checks++;
    if (cyc_b !== (NB + 2) * (EB + 3)) begin failures++; $display("FAIL RSA-512: %0d clocks", cyc_b); end
    $display("RSA-512 (N_BITS=%0d): %0d clocks", NB, cyc_b);
    fin_b = 1;
  end

  initial begin
    wait (fin_a && fin_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
