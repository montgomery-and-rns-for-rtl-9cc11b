// tb_rsa_mont: RSA exponentiation on the 64-bit engine with 32-bit exponents.
// Random odd moduli below 2^62, random messages and exponents (plus all-ones
// and all-zero exponents). The reference c^d mod N is computed by plain
// square-and-multiply on wide integers. Also checks the clock count
// (n+2)(E+3) from the start edge to done, and that every phase is visited.
module tb_rsa_mont;
  import rsa_pkg::*;
  localparam int unsigned NB = 64;
  localparam int unsigned EB = 32;
  logic clk = 0, rst = 1, start = 0;
  logic [NB-1:0] c_in, n_mod, k_const, m_out;
  logic [EB-1:0] d_in;
  logic busy, done;
  mont_phase_e phase;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  rsa_mont #(.N_BITS(NB), .E_BITS(EB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) seen[phase]++;

  initial begin
    repeat (400000) @(posedge clk);
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

  logic [2*NB:0] kk;
  logic [NB-1:0] expv;
  int cyc;

  initial begin
    c_in = '0; d_in = '0; n_mod = 64'd3; k_const = '0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 12; t++) begin
      n_mod = ({$urandom, $urandom} >> 2) | 64'h1;
      if (t == 3) n_mod = 64'h3FFF_FFFF_FFFF_FFFF;
      c_in  = {$urandom, $urandom} % n_mod;
      d_in  = $urandom;
      if (t == 1) d_in = '1;
      if (t == 2) d_in = '0;
      kk = ((2*NB+1)'(1) << (2*NB)) % (2*NB+1)'(n_mod);
      k_const = kk[NB-1:0];
      expv = modexp(c_in, d_in, n_mod);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (m_out !== expv) begin
        failures++;
        $display("FAIL t=%0d: N=%h c=%h d=%h got %h exp %h", t, n_mod, c_in, d_in, m_out, expv);
      end
      checks++;
      if (cyc !== (NB + 2) * (EB + 3)) begin
        failures++; $display("FAIL t=%0d: %0d clocks, expected %0d", t, cyc, (NB + 2) * (EB + 3));
      end
    end
    for (int p = 1; p < 5; p++) begin
      checks++;
      if (seen[p] == 0) begin failures++; $display("FAIL phase %0d never entered", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
