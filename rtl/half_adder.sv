// Half adder: sum = x XOR y, carry = x AND y. Used for the per-bit
// generate/propagate pre-processing of the Brent-Kung adder.
// Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);
  assign sum   = x ^ y;
  assign carry = x & y;
endmodule
