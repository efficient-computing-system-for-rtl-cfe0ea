// Shared sizes and helpers of the radix-8 approximate Booth multiplier.
//
// The multiplier recodes an N-bit two's-complement operand B into
// NUM_GROUPS(N) radix-8 digits B_q in {-4..+4}; each digit selects one
// partial-product row of PP_WIDTH(N) bits built from the other operand A.
// The rows are then summed by a carry-save tree (4:2 compressors and full
// adders) and a Brent-Kung carry-propagate adder.
//
// reduce_count() describes the carry-save tree used by pp_reduction: in
// each stage every group of four rows goes through a row of 4:2
// compressors, a leftover group of three through a row of full adders, and
// one or two leftover rows pass unchanged.
package r8anbm_pkg;

  // Number of radix-8 digits of an n-bit signed operand: ceil(n/3).
  function automatic int num_groups(input int n);
    return (n + 2) / 3;
  endfunction

  // Width of one partial-product row: A times a digit of magnitude up to 4,
  // including the case A = -2^(n-1), digit -4, needs n+3 signed bits.
  function automatic int pp_width(input int n);
    return n + 3;
  endfunction

  // Rows left after one carry-save stage applied to k rows.
  function automatic int reduce_step(input int k);
    int rem;
    if (k <= 2) return k;
    rem = k % 4;
    return (k / 4) * 2 + ((rem == 3) ? 2 : rem);
  endfunction

  // Rows left after s carry-save stages applied to k rows.
  function automatic int reduce_count(input int k, input int s);
    int c;
    c = k;
    for (int i = 0; i < s; i++) c = reduce_step(c);
    return c;
  endfunction

  // Number of stages until at most two rows remain.
  function automatic int reduce_stages(input int k);
    int c, s;
    c = k;
    s = 0;
    while (c > 2) begin
      c = reduce_step(c);
      s++;
    end
    return s;
  endfunction

  // Decoded control of one radix-8 digit: which multiple of A enters the
  // row (one: A, two: 2A, four: 4A; one and two together form the
  // approximate 3A) and whether the row is complemented.
  typedef struct packed {
    logic one;
    logic two;
    logic four;
    logic neg;
  } anbe_sel_t;

endpackage
