// Testbench of the approximate radix-8 Booth encoder (one row).
// For all 16 groups and many multiplicands (all 256 for N = 8, random and
// corner values for N = 16) the row, read as a signed (N+3)-bit number plus
// the neg bit, must equal A * B_q, except for B_q = +-3 where it must be
// +-(A | 2A). The decoded selects are compared with the encoder truth
// table: which of a[p], a[p-1], a[p-2] enters each bit.
module tb_anbe;
  import r8anbm_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8;
  logic [15:0] a16;
  logic [3:0]  grp;
  logic [10:0] pp8;
  logic [18:0] pp16;
  logic        neg8, neg16;
  anbe_sel_t   sel8, sel16;

  anbe #(.N(8)) dut8  (.a(a8),  .grp(grp), .pp(pp8),  .neg(neg8),  .sel(sel8));
  anbe          dut16 (.a(a16), .grp(grp), .pp(pp16), .neg(neg16), .sel(sel16));

  // truth table: digit and {one, two, four} per group value
  int           tt_digit [16] = '{0, 1, 1, 2, 2, 3, 3, 4, -4, -3, -3, -2, -2, -1, -1, 0};
  logic [2:0]   tt_sel   [16] = '{3'b000, 3'b100, 3'b100, 3'b010, 3'b010, 3'b110, 3'b110, 3'b001,
                                  3'b001, 3'b110, 3'b110, 3'b010, 3'b010, 3'b100, 3'b100, 3'b000};

  function automatic longint expect_row(longint a, int d);
    longint m;
    if (d == 3 || d == -3) begin
      m = a | (a <<< 1);
      return (d > 0) ? m : -m;
    end
    return a * d;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 16; g++) begin
      grp = 4'(g);
      // N = 8, every multiplicand
      for (int a = -128; a < 128; a++) begin
        longint got;
        a8 = 8'(a);
        #1;
        got = longint'($signed(pp8)) + longint'(neg8);
        checks++;
        if (got != expect_row(longint'(a), tt_digit[g])) begin
          failures++;
          if (failures < 10)
            $display("N=8 grp=%b a=%0d row=%0d exp %0d", grp, a, got,
                     expect_row(longint'(a), tt_digit[g]));
        end
      end
      checks++;
      if ({sel8.one, sel8.two, sel8.four} != tt_sel[g] || sel8.neg != grp[3]) begin
        failures++;
        $display("grp=%b selects %b%b%b%b", grp, sel8.one, sel8.two, sel8.four, sel8.neg);
      end
      // N = 16, corners and random
      for (int k = 0; k < 2000; k++) begin
        longint got, av;
        case (k)
          0: a16 = 16'h8000;
          1: a16 = 16'h7fff;
          2: a16 = 16'hffff;
          3: a16 = 16'h0000;
          default: a16 = 16'($urandom);
        endcase
        #1;
        av  = longint'($signed(a16));
        got = longint'($signed(pp16)) + longint'(neg16);
        checks++;
        if (got != expect_row(av, tt_digit[g])) begin
          failures++;
          if (failures < 10)
            $display("N=16 grp=%b a=%0d row=%0d exp %0d", grp, av, got,
                     expect_row(av, tt_digit[g]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
