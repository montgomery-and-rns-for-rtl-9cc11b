// tb_mont_io: drives the 64-bit Montgomery multiplier chip through its 32-bit
// word ports: loads a1, a2, b1, b2, N word by word, waits for the result words
// and checks (S1+S2)*2^64 == (a1+a2)(b1+b2) (mod N), S1+S2 < 2N, and the cycle
// budget: n/32 load clocks, n+2 multiply clocks, one clock into the output
// registers, n/32 output words.
module tb_mont_io;
  import rsa_pkg::*;
  localparam int unsigned NB = 64;
  localparam int unsigned WORDS = NB / IO_W;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [IO_W-1:0] a1_w, a2_w, b1_w, b2_w, n_w, s1_w, s2_w;
  logic out_valid, out_last, busy;
  int checks = 0, failures = 0;

  mont_io #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NB-1:0] a1, a2, b1, b2, nm, s1, s2;
  logic [NB+1:0] a, b, res;
  logic [2*NB+3:0] lhs, rhs;
  int cyc, nout;

  initial begin
    a1_w = '0; a2_w = '0; b1_w = '0; b2_w = '0; n_w = '0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 40; t++) begin
      nm = ({$urandom, $urandom} >> 2) | 64'h1;
      a  = {$urandom, $urandom, 2'b0} % (2 * nm);
      b  = {$urandom, $urandom, 2'b0} % (2 * nm);
      a1 = {$urandom, $urandom} & a[NB-1:0]; a2 = a[NB-1:0] - a1;
      b1 = {$urandom, $urandom} & b[NB-1:0]; b2 = b[NB-1:0] - b1;
      for (int w = 0; w < WORDS; w++) begin
        in_valid = 1;
        a1_w = a1[w*IO_W +: IO_W]; a2_w = a2[w*IO_W +: IO_W];
        b1_w = b1[w*IO_W +: IO_W]; b2_w = b2[w*IO_W +: IO_W];
        n_w  = nm[w*IO_W +: IO_W];
        @(negedge clk);
      end
      in_valid = 0;
      cyc = 0;
      while (!out_valid) begin @(negedge clk); cyc++; end
      checks++;
      // n+2 multiplier clocks (its first one is the start edge) plus one
      // clock to copy the result into the output registers
      if (cyc !== NB + 3) begin failures++; $display("FAIL t=%0d: %0d clocks to first word", t, cyc); end
      nout = 0;
      while (out_valid) begin
        s1[nout*IO_W +: IO_W] = s1_w;
        s2[nout*IO_W +: IO_W] = s2_w;
        nout++;
        if (out_last) begin @(negedge clk); break; end
        @(negedge clk);
      end
      checks++;
      if (nout !== WORDS) begin failures++; $display("FAIL t=%0d: %0d output words", t, nout); end
      res = (NB+2)'(s1) + (NB+2)'(s2);
      lhs = ((2*NB+4)'(res) << NB) % (2*NB+4)'(nm);
      rhs = ((2*NB+4)'(a) * (2*NB+4)'(b)) % (2*NB+4)'(nm);
      checks++;
      if (lhs !== rhs) begin failures++; $display("FAIL t=%0d: wrong product", t); end
      checks++;
      if (res >= 2 * nm) begin failures++; $display("FAIL t=%0d: product not below 2N", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
