// tb_gfa -- exhaustive test of the gated full adder: all 16 input
// combinations against 2*carry + sum = in1*in2 + in3 + in4.
module tb_gfa;
  logic in1, in2, in3, in4, sum, carry;
  int checks = 0, failures = 0;

  gfa dut (.in1, .in2, .in3, .in4, .sum, .carry);

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_total;
      {in1, in2, in3, in4} = 4'(v);
      #1;
      exp_total = (in1 && in2 ? 1 : 0) + int'(in3) + int'(in4);
      checks++;
      if (2 * int'(carry) + int'(sum) != exp_total) begin
        failures++;
        $display("FAIL in=%b%b%b%b sum=%b carry=%b", in1, in2, in3, in4, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
