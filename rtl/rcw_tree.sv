// rcw_tree: reduced-complexity Wallace reduction tree for a W x W unsigned
// product. It takes the partial-product matrix from pp_gen and compresses it,
// stage by stage, with full adders (3 bits -> sum + carry) and an occasional
// half adder, until every column holds at most two bits. The two remaining
// rows, row0 and row1, are added by the final carry-propagate adder.
//
// The matrix is kept column-wise: m[s][c][k] is bit k of column c (weight 2^c)
// at the input of stage s. In stage s column c spends its first 3*F bits on F
// full adders and the next 2*G on G half adders (counts from wallace_pkg::plan),
// and passes the rest through. The next stage's column c holds, in this order:
// the F+G sums, the passed bits, then the carries of column c-1.
// Stage targets follow Wallace's row grouping in threes (8 rows reduce in four
// stages, 16 rows in six); the per-column adder placement rule is this design's
// own, described in wallace_pkg. Purely combinational. Some output bits are
// constant zero by construction, for instance row1[0] (column 0 holds a
// single bit) and bit 2W-1 of both rows (no W x W partial product has that
// weight).
module rcw_tree
  import wallace_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0][W-1:0] pp,     // pp[row i][bit j], weight 2^(i+j)
  output logic [2*W-1:0]      row0,
  output logic [2*W-1:0]      row1
);
  localparam int S = stages(W);
  localparam int C = 2 * W;

  logic [S:0][C-1:0][W-1:0] m;

  // Stage 0: column c holds pp[i][c-i] for every row i that reaches it.
  for (genvar c = 0; c < C; c++) begin : g_init
    for (genvar k = 0; k < W; k++) begin : g_bit
      localparam int H0 = init_height(W, c);
      localparam int R  = (c < W) ? k : c - W + 1 + k;
      if (k < H0) begin : g_pp
        assign m[0][c][k] = pp[R][c-R];
      end else begin : g_zero
        assign m[0][c][k] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < C; c++) begin : g_col
      localparam int H  = plan(W, s, c, Q_HEIGHT);
      localparam int F  = plan(W, s, c, Q_FA);
      localparam int G  = plan(W, s, c, Q_HA);
      localparam int FP = (c > 0) ? plan(W, s, c - 1, Q_FA) : 0;
      localparam int GP = (c > 0) ? plan(W, s, c - 1, Q_HA) : 0;
      localparam int NP = H - 3 * F - 2 * G;   // bits passed straight through
      localparam int NH = F + G + NP + FP + GP;

      logic [W-1:0] sum;   // sums placed in this column of stage s+1
      logic [W-1:0] cy;    // carries sent to column c+1 of stage s+1

      for (genvar f = 0; f < W; f++) begin : g_fa
        if (f < F) begin : g_on
          full_adder u_fa (
            .a  (m[s][c][3*f]),
            .b  (m[s][c][3*f+1]),
            .cin(m[s][c][3*f+2]),
            .s  (sum[f]),
            .co (cy[f])
          );
        end else if (f < F + G) begin : g_ha
          half_adder u_ha (
            .a (m[s][c][3*F+2*(f-F)]),
            .b (m[s][c][3*F+2*(f-F)+1]),
            .s (sum[f]),
            .co(cy[f])
          );
        end else begin : g_off
          assign sum[f] = 1'b0;
          assign cy[f]  = 1'b0;
        end
      end

      for (genvar k = 0; k < W; k++) begin : g_next
        if (k < F + G) begin : g_sum
          assign m[s+1][c][k] = sum[k];
        end else if (k < F + G + NP) begin : g_pass
          assign m[s+1][c][k] = m[s][c][3*F+2*G+(k-F-G)];
        end else if (k < NH) begin : g_carry
          assign m[s+1][c][k] = g_stage[s].g_col[c-1].cy[k-F-G-NP];
        end else begin : g_zero
          assign m[s+1][c][k] = 1'b0;
        end
      end
    end
  end

  for (genvar c = 0; c < C; c++) begin : g_out
    assign row0[c] = m[S][c][0];
    assign row1[c] = m[S][c][1];
  end
endmodule
