// tb_add_mod2n_p1: feeds random diminished-1 values (about one in eight the
// zero code) into the modulo 257 accumulator and compares the register with
// the running sum mod 257 in ordinary binary. Checks that zero inputs leave
// the register unchanged and that reset clears it. A running sum of 256 has no
// 8-bit code and reads back as 0; the reference follows that rule.
module tb_add_mod2n_p1;
  int checks = 0, failures = 0, holds = 0, wraps = 0;
  logic clk = 0, rst = 1;
  logic [8:0] din;
  logic [7:0] acc;
  int sum, v;
  add_mod2n_p1 #(.N(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 9'h100; sum = 0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 20000; t++) begin
      v = $urandom % 257;
      if ($urandom % 8 == 0) v = 0;
      if (t % 5000 == 4999) begin
        rst = 1; @(negedge clk); rst = 0; sum = 0;
        checks++;
        if (acc !== 0) failures++;
      end
      din = (v == 0) ? 9'h100 : 9'(v - 1);
      @(negedge clk);
      if (v == 0) holds++;
      sum = (sum + v) % 257;
      if (sum == 256) begin sum = 0; wraps++; end
      checks++;
      if (int'(acc) !== sum) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, acc, sum);
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
