// Approximate novel Booth encoder (ANBE) for one radix-8 partial-product row.
//
// The group {b(3q+2), b(3q+1), b(3q), b(3q-1)} of the Booth-encoded operand
// stands for the digit B_q = -4*b(3q+2) + 2*b(3q+1) + b(3q) + b(3q-1).
// Instead of building the hard multiple 3A with a carry-propagate adder,
// each row bit is formed directly from three neighbouring bits of A:
//
//   pp[p] = ( one & a[p] | two & a[p-1] | four & a[p-2] ) XOR b(3q+2)
//
//   one  = b(3q) XOR b(3q-1)                       digit is odd
//   two  = b(3q+1) XOR maj(b(3q+2), b(3q), b(3q-1)) |digit| is 2 or 3
//   four = digit is +4 or -4
//
// For |B_q| = 3 both `one` and `two` are set and the bit becomes
// a[p] OR a[p-1], i.e. an approximate half adder (sum without carry) in
// place of A + 2A. This is the only approximation: the row is exact for
// the other 12 of the 16 group values. The selection follows the
// encoder's truth table; the gate-level form of `two` is this design's.
//
// For a negative digit the row is the one's complement; `neg` (= b(3q+2))
// must be added at the row's least significant position to complete the
// two's complement. A is sign-extended above bit N-1 and zero below bit 0.
//
// Interface: a is the N-bit two's-complement multiplicand, grp the 4-bit
// group, pp the N+3-bit row (two's complement once neg is added), sel the
// decoded digit. Purely combinational.
module anbe
  import r8anbm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [3:0]     grp,   // {b(3q+2), b(3q+1), b(3q), b(3q-1)}
  output logic [N+2:0]   pp,
  output logic           neg,
  output anbe_sel_t      sel
);
  localparam int unsigned PW = N + 3;

  logic b2, b1, b0, bm;
  assign {b2, b1, b0, bm} = grp;

  always_comb begin
    sel.one  = b0 ^ bm;
    sel.two  = b1 ^ ((b2 & b0) | (b2 & bm) | (b0 & bm));
    sel.four = (~b2 & b1 & b0 & bm) | (b2 & ~b1 & ~b0 & ~bm);
    sel.neg  = b2;
  end

  // A sign-extended to the row width, with two zero bits below bit 0 so
  // that a[p-1] and a[p-2] exist for every row position p.
  logic [PW+1:0] ax;
  assign ax = {{(PW - N){a[N-1]}}, a, 2'b00};

  always_comb begin
    for (int p = 0; p < PW; p++) begin
      pp[p] = ((sel.one & ax[p+2]) | (sel.two & ax[p+1]) | (sel.four & ax[p]))
              ^ sel.neg;
    end
  end

  assign neg = sel.neg;
endmodule
