// tb_mont5to2_new: checks the five-to-two Montgomery multiplier.
//  * 4-bit instance: the worked example a = 1101, b = 1001, N = 1111, whose
//    partial sums S[1..5] are 01001, 01100, 01111, 11000, 01100.
//  * 64-bit instance: random odd N < 2^62, a, b < 2N split randomly into
//    carry-save pairs. Checks (S1+S2)*2^64 == a*b (mod N), S1+S2 < 2N, and the
//    latency of n+2 clocks from start to done.
module tb_mont5to2_new;
  localparam int unsigned NB = 64;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  // small instance
  logic        st4 = 0;
  logic [3:0]  a41, a42, b41, b42, n4;
  logic [4:0]  s41, s42;
  logic        busy4, done4;
  mont5to2_new #(.N_BITS(4)) dut4 (.clk(clk), .rst(rst), .start(st4), .a1(a41), .a2(a42),
    .b1(b41), .b2(b42), .n_mod(n4), .s1(s41), .s2(s42), .busy(busy4), .done(done4));

  // 64-bit instance
  logic          st = 0;
  logic [NB-1:0] a1, a2, b1, b2, nm;
  logic [NB:0]   s1, s2;
  logic          busy, done;
  mont5to2_new #(.N_BITS(NB)) dut (.clk(clk), .rst(rst), .start(st), .a1(a1), .a2(a2),
    .b1(b1), .b2(b2), .n_mod(nm), .s1(s1), .s2(s2), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  logic [4:0] exp_s [1:5] = '{5'b01001, 5'b01100, 5'b01111, 5'b11000, 5'b01100};
  logic [NB+1:0] a, b, res;
  logic [2*NB+3:0] lhs, rhs;
  int cyc;

  initial begin
    a41 = 4'b1101; a42 = '0; b41 = 4'b1001; b42 = '0; n4 = 4'b1111;
    a1 = '0; a2 = '0; b1 = '0; b2 = '0; nm = 64'd1;
    @(negedge clk); rst = 0;
    st4 = 1; @(negedge clk); st4 = 0;
    for (int i = 1; i <= 5; i++) begin
      @(negedge clk);
      checks++;
      if (5'(s41 + s42) !== exp_s[i]) begin
        failures++;
        $display("FAIL example S[%0d] = %b, expected %b", i, 5'(s41 + s42), exp_s[i]);
      end
    end
    checks++;
    if (!done4) begin failures++; $display("FAIL example: done not raised after n+2 clocks"); end

    for (int t = 0; t < 60; t++) begin
      nm = (rnd64() >> 2) | 64'h1;
      if (t == 0) nm = 64'h3FFF_FFFF_FFFF_FFFF;
      if (t == 1) nm = 64'd3;
      a = {rnd64(), 2'b0} % (2 * nm);
      b = {rnd64(), 2'b0} % (2 * nm);
      if (t == 2) begin a = 2 * nm - 1; b = 2 * nm - 1; end
      a1 = rnd64() & a[NB-1:0]; a2 = a[NB-1:0] - a1;
      b1 = rnd64() & b[NB-1:0]; b2 = b[NB-1:0] - b1;
      st = 1; @(negedge clk); st = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      res = (NB+2)'(s1) + (NB+2)'(s2);
      lhs = ((2*NB+4)'(res) << NB) % (2*NB+4)'(nm);
      rhs = ((2*NB+4)'(a) * (2*NB+4)'(b)) % (2*NB+4)'(nm);
      checks++;
      if (lhs !== rhs) begin failures++; $display("FAIL t=%0d: congruence", t); end
      checks++;
      if (res >= 2 * nm) begin failures++; $display("FAIL t=%0d: result not below 2N", t); end
      checks++;
      if (cyc !== NB + 2) begin failures++; $display("FAIL t=%0d: %0d clocks, expected %0d", t, cyc, NB + 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
