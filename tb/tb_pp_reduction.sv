// Testbench of the carry-save reduction tree. Three instances cover the
// stage shapes: K = 8 (two stages of 4:2 rows, the multiplier's default
// size), K = 5 (a 4:2 row with a passed row, then a full-adder row) and
// K = 3 (one full-adder row). For random rows the two outputs must add up
// to the sum of the inputs modulo 2^W.
module tb_pp_reduction;
  int checks = 0, failures = 0;

  logic [31:0] r8 [8];
  logic [31:0] s8, c8;
  logic [15:0] r5 [5];
  logic [15:0] s5, c5;
  logic [11:0] r3 [3];
  logic [11:0] s3, c3;

  pp_reduction                    dut8 (.rows(r8), .sum_o(s8), .carry_o(c8));
  pp_reduction #(.W(16), .K(5))   dut5 (.rows(r5), .sum_o(s5), .carry_o(c5));
  pp_reduction #(.W(12), .K(3))   dut3 (.rows(r3), .sum_o(s3), .carry_o(c3));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] e8;
      logic [15:0] e5;
      logic [11:0] e3;
      e8 = '0; e5 = '0; e3 = '0;
      for (int k = 0; k < 8; k++) begin
        r8[k] = (t < 2) ? {32{t[0]}} : $urandom;
        e8 += r8[k];
      end
      for (int k = 0; k < 5; k++) begin
        r5[k] = (t < 2) ? {16{t[0]}} : 16'($urandom);
        e5 += r5[k];
      end
      for (int k = 0; k < 3; k++) begin
        r3[k] = (t < 2) ? {12{t[0]}} : 12'($urandom);
        e3 += r3[k];
      end
      #1;
      checks += 3;
      if (32'(s8 + c8) != e8) failures++;
      if (16'(s5 + c5) != e5) failures++;
      if (12'(s3 + c3) != e3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
