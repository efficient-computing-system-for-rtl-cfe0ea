// Brent-Kung parallel-prefix adder: sum = x + y (mod 2^W), cout = carry out.
//
// Half adders form per-bit generate g = x&y and propagate p = x^y. An
// up-sweep of log2(W) levels combines (g,p) pairs into group signals at
// indices 2^(l+1)-1, 2*2^(l+1)-1, ...; a down-sweep of log2(W)-1 levels then
// fills in the remaining prefixes. The prefix G[i] is the carry out of bit
// i, and sum[i] = p[i] XOR G[i-1]. W need not be a power of two: the tree
// is built for the next power of two with the upper inputs tied to zero.
// The adder is the final two-operand adder of the multiplier, as in the
// published design; the prefix-tree layout is the textbook Brent-Kung one.
// Purely combinational.
module bk_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int L  = (W < 2) ? 1 : $clog2(W);
  localparam int WP = 1 << L;
  // level 0: pre-processing, 1..L: up-sweep, L+1..2L-1: down-sweep
  localparam int NLV = 2 * L;

  logic [WP-1:0] xp, yp, p0;
  logic [WP-1:0] g [NLV];
  logic [WP-1:0] p [NLV];

  assign xp = WP'(x);
  assign yp = WP'(y);

  for (genvar i = 0; i < WP; i++) begin : g_pre
    half_adder u_ha (.x(xp[i]), .y(yp[i]), .sum(p0[i]), .carry(g[0][i]));
  end
  assign p[0] = p0;

  // up-sweep
  for (genvar l = 0; l < L; l++) begin : g_up
    for (genvar i = 0; i < WP; i++) begin : g_bit
      if (((i + 1) % (2 << l)) == 0) begin : g_black
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // down-sweep
  for (genvar d = 0; d < L - 1; d++) begin : g_down
    localparam int LL = L - 2 - d;
    for (genvar i = 0; i < WP; i++) begin : g_bit
      if ((((i + 1) % (2 << LL)) == (1 << LL)) && ((i + 1) > (2 << LL))) begin : g_black
        assign g[L+d+1][i] = g[L+d][i] | (p[L+d][i] & g[L+d][i-(1<<LL)]);
        assign p[L+d+1][i] = p[L+d][i] & p[L+d][i-(1<<LL)];
      end else begin : g_pass
        assign g[L+d+1][i] = g[L+d][i];
        assign p[L+d+1][i] = p[L+d][i];
      end
    end
  end

  logic [WP-1:0] carry;
  assign carry = g[NLV-1];

  assign sum  = p0[W-1:0] ^ {carry[W-2:0], 1'b0};
  assign cout = carry[W-1];
endmodule
