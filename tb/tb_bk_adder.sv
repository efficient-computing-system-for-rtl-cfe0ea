// Testbench of the Brent-Kung adder at its default width (32), at 16 and
// at a width that is not a power of two (13). Random and carry-chain
// corner operands; sum and carry out are compared with {cout, sum} = x + y.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [31:0] x32, y32, s32;
  logic [15:0] x16, y16, s16;
  logic [12:0] x13, y13, s13;
  logic        c32, c16, c13;

  bk_adder                dut32 (.x(x32), .y(y32), .sum(s32), .cout(c32));
  bk_adder #(.W(16))      dut16 (.x(x16), .y(y16), .sum(s16), .cout(c16));
  bk_adder #(.W(13))      dut13 (.x(x13), .y(y13), .sum(s13), .cout(c13));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin x32 = '1; y32 = 32'd1; x16 = '1; y16 = 16'd1; x13 = '1; y13 = 13'd1; end
        1: begin x32 = '1; y32 = '1;    x16 = '1; y16 = '1;    x13 = '1; y13 = '1;    end
        2: begin x32 = '0; y32 = '0;    x16 = '0; y16 = '0;    x13 = '0; y13 = '0;    end
        3: begin x32 = 32'h5555_5555; y32 = 32'haaaa_aaab;
                 x16 = 16'h5555; y16 = 16'haaab; x13 = 13'h0aaa; y13 = 13'h1556; end
        default: begin
          x32 = $urandom; y32 = $urandom;
          x16 = 16'($urandom); y16 = 16'($urandom);
          x13 = 13'($urandom); y13 = 13'($urandom);
        end
      endcase
      #1;
      checks += 3;
      if ({c32, s32} != 33'(x32) + 33'(y32)) failures++;
      if ({c16, s16} != 17'(x16) + 17'(y16)) failures++;
      if ({c13, s13} != 14'(x13) + 14'(y13)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
