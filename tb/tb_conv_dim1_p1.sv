// tb_conv_dim1_p1: random 48-bit numbers (and edge values) through the
// six-block converter to diminished-1 modulo 257; compares with x mod 257
// encoded in diminished-1 form (bit 8 set for residue 0).
module tb_conv_dim1_p1;
  int checks = 0, failures = 0, zeros = 0;
  logic [47:0] x;
  logic [8:0]  dr;
  logic [63:0] r;
  conv_dim1_p1 #(.N(8)) dut (.x(x), .dr(dr));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      x = {$urandom, $urandom};
      if (t < 16) x = 48'(t);
      if (t == 16) x = '1;
      if (t >= 17 && t < 40) x = 48'(257 * ({$urandom} % 1000000));
      if (t >= 40 && t < 60) x = 48'({$urandom} & 32'h0000_FF00);
      #1;
      r = 64'(x) % 64'd257;
      if (r == 0) zeros++;
      checks++;
      if (dr !== ((r == 0) ? 9'h100 : 9'(r - 1))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h got %h residue %0d", x, dr, r);
      end
    end
    checks++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
