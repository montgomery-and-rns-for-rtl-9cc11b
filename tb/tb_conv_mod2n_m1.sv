// tb_conv_mod2n_m1: random 48-bit numbers (and edge values) through the
// six-block converter modulo 255; an output of all ones counts as 0.
module tb_conv_mod2n_m1;
  int checks = 0, failures = 0;
  logic [47:0] x;
  logic [7:0]  r;
  conv_mod2n_m1 #(.N(8)) dut (.x(x), .r(r));

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
      if (t >= 17 && t < 40) x = 48'(255 * ({$urandom} % 1000000));
      #1;
      checks++;
      if (64'(r) % 64'd255 !== 64'(x) % 64'd255) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h got %h", x, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
