// Exhaustive testbench of the half adder: x + y = 2*carry + sum.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic x, y, sum, carry;

  half_adder dut (.x(x), .y(y), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if (int'(x) + int'(y) != 2 * int'(carry) + int'(sum)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
