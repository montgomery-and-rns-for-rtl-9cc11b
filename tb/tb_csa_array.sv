// tb_csa_array: random vectors through a 16-bit carry-save row; checks that
// sum + carry equals the three-operand sum and that sum is the bitwise XOR.
module tb_csa_array;
  localparam int unsigned W = 16;
  logic [W-1:0] x1, x2, x3, sum;
  logic [W:0]   carry;
  int checks = 0, failures = 0;

  csa_array #(.W(W)) dut (.x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      x1 = W'($urandom); x2 = W'($urandom); x3 = W'($urandom);
      if (t == 0) begin x1 = '1; x2 = '1; x3 = '1; end
      #1;
      checks++;
      if ((W+2)'(sum) + (W+2)'(carry) !== (W+2)'(x1) + (W+2)'(x2) + (W+2)'(x3)) begin
        failures++;
        $display("FAIL sum %h %h %h -> %h %h", x1, x2, x3, sum, carry);
      end
      checks++;
      if (sum !== (x1 ^ x2 ^ x3) || carry[0] !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
