// tb_mul_mod2n_m1: exhaustive check of the modulo 2^n - 1 multiplier for n = 8
// (modulus 255) and n = 5 (modulus 31). An output of all ones counts as 0.
module tb_mul_mod2n_m1;
  int checks = 0, failures = 0;
  logic [7:0] a8, b8, p8;
  logic [4:0] a5, b5, p5;
  mul_mod2n_m1 #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  mul_mod2n_m1 #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        checks++;
        if (int'(p8) % 255 !== (a * b) % 255) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 %0d*%0d: got %0d", a, b, p8);
        end
      end
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        a5 = 5'(a); b5 = 5'(b); #1;
        checks++;
        if (int'(p5) % 31 !== (a * b) % 31) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
