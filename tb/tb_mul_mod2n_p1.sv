// tb_mul_mod2n_p1: exhaustive check of the diminished-1 multiplier for
// n = 8 (modulus 257, prime) and n = 6 (modulus 65 = 5*13, so non-zero operands
// can give a zero product). Every pair of values 0..2^n is encoded in
// diminished-1 form and the output compared with (a*b) mod (2^n+1), encoded
// the same way.
module tb_mul_mod2n_p1;
  int checks = 0, failures = 0;
  int zero_products = 0;

  logic [8:0] da8, db8, dp8;
  logic [6:0] da6, db6, dp6;
  mul_mod2n_p1 #(.N(8)) dut8 (.da(da8), .db(db8), .dp(dp8));
  mul_mod2n_p1 #(.N(6)) dut6 (.da(da6), .db(db6), .dp(dp6));

  function automatic logic [8:0] enc(int v, int n);
    return (v == 0) ? 9'(1 << n) : 9'(v - 1);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 256; a++)
      for (int b = 0; b <= 256; b++) begin
        da8 = enc(a, 8); db8 = enc(b, 8); #1;
        checks++;
        if (dp8 !== enc((a * b) % 257, 8)) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 %0d*%0d: got %h exp %h", a, b, dp8, enc((a * b) % 257, 8));
        end
      end
    for (int a = 0; a <= 64; a++)
      for (int b = 0; b <= 64; b++) begin
        da6 = 7'(enc(a, 6)); db6 = 7'(enc(b, 6)); #1;
        checks++;
        if (a !== 0 && b !== 0 && (a * b) % 65 == 0) zero_products++;
        if (dp6 !== 7'(enc((a * b) % 65, 6))) begin
          failures++;
          if (failures < 10) $display("FAIL n=6 %0d*%0d: got %h", a, b, dp6);
        end
      end
    checks++;
    if (zero_products == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
