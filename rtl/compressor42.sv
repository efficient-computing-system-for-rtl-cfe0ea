// 4:2 compressor: reduces four bits of one column, plus a carry-in from the
// column to its right, to a sum bit (weight 1) and two carries (weight 2):
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// cout does not depend on cin, so a row of these cells has no ripple chain.
// Built from two full adders, the usual construction; the reduction tree
// of the multiplier uses rows of these cells.
// Purely combinational.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.x(x1), .y(x2), .z(x3), .sum(s1),  .carry(cout));
  full_adder u_fa2 (.x(s1), .y(x4), .z(cin), .sum(sum), .carry(carry));
endmodule
