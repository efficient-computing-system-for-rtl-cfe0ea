// Exhaustive testbench of the 4:2 compressor: the five inputs must sum to
// sum + 2*(carry + cout), and cout must not depend on cin (checked by
// comparing cout for cin = 0 and cin = 1).
module tb_compressor42;
  int checks = 0, failures = 0;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic cout0;

  compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                    .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(i);
        cin = 1'(c);
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
            != int'(sum) + 2 * (int'(carry) + int'(cout))) failures++;
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
