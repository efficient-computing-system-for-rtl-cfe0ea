// Self-checking testbench of the radix-8 approximate Booth multiplier.
// Instance 1 (N = 8) is checked against the reference model for all 2^16
// operand pairs, and the error metrics of the approximation (accuracy,
// NMED, MRED) are printed. Instance 2 (N = 16, the default) is checked on
// random and corner operands. The product is combinational, so each pair
// is checked one time step after it is applied.
module tb_r8anbm;
  import r8anbm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  r8anbm #(.N(8)) dut8  (.a(a8),  .b(b8),  .p(p8));
  r8anbm          dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    longint exp;
    a16 = a; b16 = b;
    #1;
    exp = approx_mul(longint'(a), longint'(b), 16);
    checks++;
    if (longint'($signed(p16)) != exp) begin
      failures++;
      if (failures < 10)
        $display("N=16 mismatch a=%0d b=%0d got %0d exp %0d",
                 $signed(a), $signed(b), $signed(p16), exp);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Exhaustive sweep of the N = 8 instance with error metrics. The
  // stimulus changes on the falling edge of a clock; each product is
  // checked and accumulated on the rising edge.
  logic   clk = 1'b0;
  logic   sweep_on = 1'b0;
  longint sum_ed = 0, max_ed = 0;
  int     n_exact = 0, n_approx_cases = 0, n_swept = 0;
  real    sum_red = 0.0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (sweep_on) begin
      longint exact, appr, ed;
      exact = sext(longint'(a8), 8) * sext(longint'(b8), 8);
      appr  = approx_mul(longint'(a8), longint'(b8), 8);
      checks++;
      n_swept++;
      if (longint'($signed(p8)) != appr) begin
        failures++;
        if (failures < 10)
          $display("N=8 mismatch a=%0d b=%0d got %0d exp %0d",
                   $signed(a8), $signed(b8), $signed(p8), appr);
      end
      if (approx_digits(longint'(b8), 8) != 0) n_approx_cases++;
      ed = (exact > appr) ? exact - appr : appr - exact;
      sum_ed += ed;
      if (ed > max_ed) max_ed = ed;
      if (ed == 0) n_exact++;
      if (exact != 0) sum_red += real'(ed) / ((exact < 0) ? real'(-exact) : real'(exact));
    end
  end

  task automatic sweep8();
    @(negedge clk);
    sweep_on = 1'b1;
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a8 = 8'(ia); b8 = 8'(ib);
        @(negedge clk);
      end
    end
    sweep_on = 1'b0;
    @(negedge clk);
    // Properties known without the model: every product without a +-3
    // digit is exact, not every product is exact, all pairs were seen.
    checks++;
    if (n_swept != 65536 || n_exact == 65536 || n_exact < 65536 - n_approx_cases)
      failures++;
    $display("N=8 exhaustive: accuracy %0.2f %%  NMED %0.4e  MRED %0.4e  max ED %0d",
             100.0 * real'(n_exact) / 65536.0,
             real'(sum_ed) / 65536.0 / real'(max_ed), sum_red / 65536.0, max_ed);
  endtask

  initial begin
    sweep8();

    // N = 16: exact cases and random
    check16(16'h0000, 16'h1234);
    check16(16'h8000, 16'h8000);
    check16(16'h7fff, 16'h7fff);
    check16(16'h8000, 16'h7fff);
    check16(16'hffff, 16'hffff);
    check16(16'h0005, 16'h0002);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));
    // b = +-4 is a single exact digit: the product must be exact
    a16 = 16'sd1234; b16 = 16'sd4; #1;
    checks++;
    if ($signed(p16) != 32'sd4936) failures++;
    a16 = -16'sd1234; b16 = -16'sd4; #1;
    checks++;
    if ($signed(p16) != 32'sd4936) failures++;
    // b = +-3 is the approximated digit: 3 * 3 gives 3 | 6 = 7, not 9
    a16 = 16'sd3; b16 = 16'sd3; #1;
    checks++;
    if ($signed(p16) != 32'sd7) failures++;
    a16 = 16'sd3; b16 = -16'sd3; #1;
    checks++;
    if ($signed(p16) != -32'sd7) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
