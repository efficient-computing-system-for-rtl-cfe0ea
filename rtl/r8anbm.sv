// Radix-8 approximate novel Booth multiplier (R8ANBM): p ~= a * b for
// N-bit two's-complement a (multiplicand) and b (multiplier), 2N-bit result.
//
// 1. Booth grouping: b is extended with b(-1) = 0 below and copies of its
//    sign bit above; group q (q = 0 .. ceil(N/3)-1) is
//    {b(3q+2), b(3q+1), b(3q), b(3q-1)}, overlapping its neighbour by one bit.
// 2. One ANBE per group forms an (N+3)-bit row for A*B_q; only B_q = +-3 is
//    approximate (A OR 2A in place of A + 2A).
// 3. Sign extension is avoided as in the usual Booth dot diagram: each row's
//    sign bit is inverted, and one constant row holds the ones that undo the
//    inversion. A second row collects the `neg` bits, the +1 of each
//    negative row's two's complement, at position 3q.
// 4. The rows are reduced by 4:2 compressors and full adders to two rows
//    and added by a Brent-Kung adder.
//
// The encoder, the use of 4:2 compressors, full and half adders and the
// Brent-Kung final adder follow the published design; the width N = 16,
// the row width N+3, the single constant row and the tree shape are this
// design's choices.
//
// Everything is modulo 2^(2N); the exact product always fits, so the result
// differs from a*b only through the +-3 approximation. Purely
// combinational: the product is valid in the same cycle as the operands.
module r8anbm
  import r8anbm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int NG = num_groups(N);
  localparam int PW = pp_width(N);
  localparam int W  = 2 * N;
  localparam int K  = NG + 2;          // NG rows + neg-bit row + constant row

  // Constant that undoes the inverted sign bits: sum over rows of
  // -2^(PW-1) * 8^q, modulo 2^W.
  function automatic logic [W-1:0] sign_const();
    logic [W-1:0] c;
    c = '0;
    for (int q = 0; q < NG; q++) begin
      if (3 * q + PW - 1 < W) c = c - (W'(1) << (3 * q + PW - 1));
    end
    return c;
  endfunction

  localparam logic [W-1:0] SIGN_CONST = sign_const();

  // b with b(-1) = 0 at index 0 and sign extension above
  logic [3*NG:0] bx;
  assign bx = {{(3 * NG - N){b[N-1]}}, b, 1'b0};

  logic [PW-1:0] pp   [NG];
  logic [NG-1:0] negs;
  logic [W-1:0]  rows [K];
  logic [W-1:0]  neg_row;

  for (genvar q = 0; q < NG; q++) begin : g_row
    anbe_sel_t sel_unused;
    anbe #(.N(N)) u_anbe (
      .a  (a),
      .grp(bx[3*q+3 -: 4]),
      .pp (pp[q]),
      .neg(negs[q]),
      .sel(sel_unused)
    );
    // row with inverted sign bit, placed at weight 8^q
    logic [PW-1:0] row_bits;
    assign row_bits = {~pp[q][PW-1], pp[q][PW-2:0]};
    assign rows[q]  = W'({{W{1'b0}}, row_bits} << (3 * q));
  end

  always_comb begin
    neg_row = '0;
    for (int q = 0; q < NG; q++) neg_row[3*q] = negs[q];
  end

  assign rows[NG]   = neg_row;
  assign rows[NG+1] = SIGN_CONST;

  logic [W-1:0] s_row, c_row;
  logic         cout_unused;

  pp_reduction #(.W(W), .K(K)) u_tree (
    .rows   (rows),
    .sum_o  (s_row),
    .carry_o(c_row)
  );

  bk_adder #(.W(W)) u_cpa (
    .x   (s_row),
    .y   (c_row),
    .sum (p),
    .cout(cout_unused)
  );
endmodule
