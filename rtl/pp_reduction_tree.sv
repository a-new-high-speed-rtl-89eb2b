// pp_reduction_tree: regular 4-2 counter tree that reduces R rows to two.
//
// The R input rows are already shifted to their weight and sign-extended to
// the full width W. The tree works row-wise, so every column holds the same
// slice of counters, which is what makes it regular:
//   * while more than eight rows remain, one level of 4-2 counters turns each
//     group of four rows into two (a sum row and a carry row shifted up one
//     column); three rows left over go through a row of 3-2 counters, one or
//     two left-over rows pass to the next level unchanged;
//   * the last at most eight rows (padded with zero rows) enter a row of 8-2
//     counter slices, which gives the two final operands.
// Within a 4-2 counter row the lateral carry of column k feeds column k+1;
// it does not ripple, since a counter's cout does not depend on its cin.
// All arithmetic is modulo 2^W: carries out of the top column are dropped.
// This is exact whenever the true total fits in W bits, as a product of two
// N-bit numbers does in 2N bits.
//
// For the default R = 28 rows (27 Booth rows and one row of +1 bits) the
// levels are 28 -> 14 -> 8 -> 2, i.e. two 4-2 levels and the 8-2 slices.
// The source design describes a regular tree of 4-2 counters ending in an
// eight-to-two counter; the row-wise arrangement, the 3-2 rows for three
// left-over rows and the full sign extension are this design's choices.
//
// Interface: rows[R] of W bits -> sum_o + carry_o == sum of rows (mod 2^W).
// carry_o[1:0] are always 0 (nothing carries into the two lowest columns of
// the final carry row); they are kept so that both outputs are W bits wide.
// The lateral carries and the carry of the top column are left unconnected,
// which is what makes the arithmetic modulo 2^W. Purely combinational.
module pp_reduction_tree
  import booth_pkg::*;
#(
  parameter int W = 108,
  parameter int R = 28
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  localparam int LV = tree_levels(R);
  localparam int RF = tree_rows_at(R, LV);

  // g_lvl[l].rin holds the rows entering 4-2 level l, g_lvl[l].rout the rows
  // it hands on; every level is its own generate scope.
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int RIN  = tree_rows_at(R, l);
    localparam int ROUT = tree_rows_after(RIN);
    localparam int G    = RIN / 4;
    localparam int REM  = RIN % 4;

    wire [W-1:0] rin  [RIN];
    wire [W-1:0] rout [ROUT];

    if (l == 0) begin : g_src
      for (genvar r = 0; r < RIN; r++) begin : g_row
        assign rin[r] = rows[r];
      end
    end else begin : g_src
      for (genvar r = 0; r < RIN; r++) begin : g_row
        assign rin[r] = g_lvl[l-1].rout[r];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_grp
      wire [W-1:0] s, c;
      for (genvar k = 0; k < W; k++) begin : g_col
        wire co;   // lateral carry to column k+1
        wire ci;
        if (k == 0) begin : g_ci
          assign ci = 1'b0;
        end else begin : g_ci
          assign ci = g_grp[g].g_col[k-1].co;
        end
        counter_4to2 u_c42 (
          .x   ({rin[4*g+3][k], rin[4*g+2][k], rin[4*g+1][k], rin[4*g][k]}),
          .cin (ci),
          .s   (s[k]),
          .c   (c[k]),
          .cout(co)
        );
      end
      assign rout[2*g]   = s;
      assign rout[2*g+1] = {c[W-2:0], 1'b0};
    end

    if (REM == 3) begin : g_fa_row
      wire [W-1:0] s, co;
      for (genvar k = 0; k < W; k++) begin : g_col
        counter_3to2 u_c32 (
          .a (rin[4*G][k]),
          .b (rin[4*G+1][k]),
          .c (rin[4*G+2][k]),
          .s (s[k]),
          .co(co[k])
        );
      end
      assign rout[2*G]   = s;
      assign rout[2*G+1] = {co[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign rout[2*G+r] = rin[4*G+r];
      end
    end
  end

  // Final stage: one 8-2 counter slice per column, rows padded to eight.
  wire [W-1:0] fin [8];
  for (genvar r = 0; r < 8; r++) begin : g_fin_row
    if (r >= RF) begin : g_src
      assign fin[r] = '0;
    end else if (LV == 0) begin : g_src
      assign fin[r] = rows[r];
    end else begin : g_src
      assign fin[r] = g_lvl[LV-1].rout[r];
    end
  end

  wire [W-1:0] fs, fc;
  for (genvar k = 0; k < W; k++) begin : g_fin
    wire [4:0] co;
    wire [4:0] ci;
    if (k == 0) begin : g_ci
      assign ci = '0;
    end else begin : g_ci
      assign ci = g_fin[k-1].co;
    end
    counter_8to2 u_c82 (
      .x ({fin[7][k], fin[6][k], fin[5][k], fin[4][k],
           fin[3][k], fin[2][k], fin[1][k], fin[0][k]}),
      .ci(ci),
      .co(co),
      .s (fs[k]),
      .c (fc[k])
    );
  end

  assign sum_o   = fs;
  assign carry_o = {fc[W-2:0], 1'b0};

endmodule
