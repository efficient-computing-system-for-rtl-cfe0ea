// Full adder: adds three bits of equal weight into a sum bit (weight 1)
// and a carry bit (weight 2). The building block of the 3:2 rows and of
// the 4:2 compressors in the partial-product reduction tree.
// Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic carry
);
  assign sum   = x ^ y ^ z;
  assign carry = (x & y) | (x & z) | (y & z);
endmodule
