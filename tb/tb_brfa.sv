// tb_brfa: loads random a1, a2 into a 16-bit barrel register full adder and
// checks that the serial output reproduces the bits of a1 + a2, that the
// rotating registers come back to their original contents after W steps
// (second pass gives the same bits when reloaded carry-free is not needed:
// the test reloads), and that zero_out forces the output low.
module tb_brfa;
  localparam int unsigned W = 16;
  logic clk = 0, rst = 1, load = 0, advance = 0, zero_out = 0;
  logic [W-1:0] a1, a2;
  logic bit_o;
  logic [W:0] ref_sum;
  int checks = 0, failures = 0;

  brfa #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 0;
    for (int t = 0; t < 200; t++) begin
      a1 = W'($urandom); a2 = W'($urandom);
      if (t == 0) begin a1 = '1; a2 = W'(1); end
      ref_sum = (W+1)'(a1) + (W+1)'(a2);
      load = 1; @(negedge clk); load = 0; advance = 1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (bit_o !== ref_sum[i]) begin
          failures++;
          $display("FAIL t=%0d bit %0d: got %b exp %b", t, i, bit_o, ref_sum[i]);
        end
        if (i == 3) begin
          zero_out = 1; #1;
          checks++;
          if (bit_o !== 1'b0) failures++;
          zero_out = 0; #1;
        end
        @(negedge clk);
      end
      advance = 0;
      // After W rotations the barrels hold a1, a2 again: their bit 0 plus the
      // final carry reproduce bit 0 of the sum plus the carry out.
      checks++;
      if (bit_o !== (a1[0] ^ a2[0] ^ ref_sum[W])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
