// Exhaustive testbench of the full adder: x + y + z = 2*carry + sum.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic x, y, z, sum, carry;

  full_adder dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      checks++;
      if (int'(x) + int'(y) + int'(z) != 2 * int'(carry) + int'(sum)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
