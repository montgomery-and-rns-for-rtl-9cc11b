// tb_add_mod2n_m1: feeds random residues into the modulo 255 accumulator and
// compares the register (all ones counting as 0) with the running sum mod 255;
// also checks that reset clears it.
module tb_add_mod2n_m1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] din, acc;
  int sum, v;
  add_mod2n_m1 #(.N(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; sum = 0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 20000; t++) begin
      v = $urandom % 256;
      if (t % 5000 == 4999) begin
        rst = 1; @(negedge clk); rst = 0; sum = 0;
        checks++;
        if (acc !== 0) failures++;
      end
      din = 8'(v);
      @(negedge clk);
      sum = (sum + v) % 255;
      checks++;
      if (int'(acc) % 255 !== sum) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, acc, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
