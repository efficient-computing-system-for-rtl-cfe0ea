// Carry-save reduction of K partial-product rows of W bits to two rows.
//
// The tree is built in stages (see r8anbm_pkg::reduce_count). In every
// stage each group of four rows passes through a row of 4:2 compressors
// (the compressor's cout feeds the cin of the next column, its carry goes
// one column left), a leftover group of three rows through a row of full
// adders (3:2), and one or two leftover rows pass unchanged. Stages repeat
// until two rows remain. All arithmetic is modulo 2^W: carries out of the
// top column are dropped, which does not change the sum mod 2^W.
//
// Reducing with 4:2 compressors and full adders follows the published
// multiplier; the stage-by-stage word-level arrangement is this design's.
//
// Interface: rows[k] are the K input rows, sum_o + carry_o equals the sum
// of all rows mod 2^W. Purely combinational.
module pp_reduction
  import r8anbm_pkg::*;
#(
  parameter int unsigned W = 32,
  parameter int unsigned K = 8
) (
  input  logic [W-1:0] rows [K],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  localparam int S = reduce_stages(K);

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int KI = reduce_count(K, s);
    localparam int KO = reduce_count(K, s + 1);
    localparam int NQ = KI / 4;
    localparam int RM = KI % 4;

    logic [W-1:0] rin  [KI];
    logic [W-1:0] rout [KO];

    if (s == 0) begin : g_src_in
      for (genvar r = 0; r < KI; r++) begin : g_row
        assign rin[r] = rows[r];
      end
    end else begin : g_src_prev
      for (genvar r = 0; r < KI; r++) begin : g_row
        assign rin[r] = g_stage[s-1].rout[r];
      end
    end

    // groups of four: rows of 4:2 compressors
    for (genvar q = 0; q < NQ; q++) begin : g_c42
      logic [W-1:0] c_sum, c_car, c_out;
      for (genvar i = 0; i < W; i++) begin : g_bit
        compressor42 u_c42 (
          .x1   (rin[4*q+0][i]),
          .x2   (rin[4*q+1][i]),
          .x3   (rin[4*q+2][i]),
          .x4   (rin[4*q+3][i]),
          .cin  ((i == 0) ? 1'b0 : c_out[(i == 0) ? 0 : i-1]),
          .sum  (c_sum[i]),
          .carry(c_car[i]),
          .cout (c_out[i])
        );
      end
      // the carries out of the top column have weight 2^W and are dropped
      assign rout[2*q]   = c_sum;
      assign rout[2*q+1] = {c_car[W-2:0], 1'b0};
    end

    if (RM == 3) begin : g_fa
      // leftover group of three: a row of full adders
      logic [W-1:0] f_sum, f_car;
      for (genvar i = 0; i < W; i++) begin : g_bit
        full_adder u_fa (
          .x    (rin[4*NQ+0][i]),
          .y    (rin[4*NQ+1][i]),
          .z    (rin[4*NQ+2][i]),
          .sum  (f_sum[i]),
          .carry(f_car[i])
        );
      end
      assign rout[2*NQ]   = f_sum;
      assign rout[2*NQ+1] = {f_car[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < RM; r++) begin : g_row
        assign rout[2*NQ+r] = rin[4*NQ+r];
      end
    end
  end

  if (S == 0) begin : g_none
    assign sum_o = rows[0];
    if (K >= 2) begin : g_two
      assign carry_o = rows[1];
    end else begin : g_one
      assign carry_o = '0;
    end
  end else begin : g_out
    assign sum_o   = g_stage[S-1].rout[0];
    assign carry_o = g_stage[S-1].rout[1];
  end
endmodule
