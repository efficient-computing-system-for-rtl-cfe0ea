// Reference models for the testbenches, written at the integer level and
// independent of the gate-level structure of the RTL.
//
// approx_mul: radix-8 Booth product in which each digit B_q = +-3 contributes
// +-(A | 2A) (bitwise OR of the sign-extended values) instead of +-3A; all
// other digits contribute exactly A*B_q. Result taken modulo 2^(2n) and
// returned sign-extended.
package r8anbm_ref_pkg;

  function automatic longint sext(input longint v, input int w);
    longint m;
    m = (64'sd1 <<< w) - 1;
    v = v & m;
    if (((v >>> (w - 1)) & 1) != 0) v = v - (64'sd1 <<< w);
    return v;
  endfunction

  function automatic int bit_of(input longint b, input int i, input int n);
    if (i < 0) return 0;
    if (i >= n) i = n - 1;
    return int'((b >>> i) & 1);
  endfunction

  // Booth digit q of the n-bit value b
  function automatic int digit(input longint b, input int q, input int n);
    return -4 * bit_of(b, 3*q+2, n) + 2 * bit_of(b, 3*q+1, n)
           + bit_of(b, 3*q, n) + bit_of(b, 3*q-1, n);
  endfunction

  // number of digits equal to +-3 (the approximated cases)
  function automatic int approx_digits(input longint b, input int n);
    int c;
    c = 0;
    for (int q = 0; q < (n + 2) / 3; q++) begin
      int d;
      d = digit(b, q, n);
      if (d == 3 || d == -3) c++;
    end
    return c;
  endfunction

  function automatic longint approx_mul(input longint a, input longint b, input int n);
    longint as_, tot, m, pp;
    as_ = sext(a, n);
    tot = 0;
    for (int q = 0; q < (n + 2) / 3; q++) begin
      int d;
      d = digit(b, q, n);
      if (d == 3 || d == -3) begin
        m  = as_ | (as_ <<< 1);
        pp = (d > 0) ? m : -m;
      end else begin
        pp = as_ * d;
      end
      tot = tot + (pp <<< (3 * q));
    end
    return sext(tot, 2 * n);
  endfunction

endpackage
