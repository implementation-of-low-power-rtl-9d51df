// tgm_wallace_matrix: Wallace-tree full-adder matrix of the multiplier.
//
// It takes the N x N partial products and reduces them, in carry-save form,
// to two 2N-bit rows whose sum is the product. All partial-product terms
// enter the matrix at once, and each column is reduced in parallel stages,
// so the longest full-adder chain has NUM_STAGES cells. A column-ripple
// array needs about N cells. Shorter chains produce and propagate fewer
// glitches, which is why the document bases its low-power multiplier on a
// Wallace tree.
//
// The stage schedule comes from tgm_pkg. In each stage, a column sends every
// complete group of three bits through a full adder and a leftover pair
// through a half adder. A single leftover bit passes through. Carries go to
// the next column of the next stage, and the carry out of the top column is
// dropped because the product is taken modulo 2^(2N). With SIGNED set, the
// two Baugh-Wooley constant ones enter column N and column 2N-1 as extra
// matrix bits. For N = 16 the tree has 6 stages in either mode.
//
// Bit order inside a column, in every stage: full-adder sums, then the
// half-adder sum, then the passed bit, then carries from the column to the
// right. In the initial matrix, a column is ordered by partial-product row,
// with the constant one last. The document gives the principle (a Wallace
// tree of full and half adders), not its exact wiring. This rule is this
// design's own.
//
// Interface: pp[j][i] is partial product X_i Y_j (already inverted where
// Baugh-Wooley requires it). sum_row and carry_row are the two output rows,
// with bit c of each weighing 2^c.
// Timing: purely combinational.
module tgm_wallace_matrix #(
  parameter int unsigned N      = tgm_pkg::DEFAULT_WIDTH,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      sum_row,
  output logic [2*N-1:0]      carry_row
);
  import tgm_pkg::*;

  localparam int NST  = num_stages(N, SIGNED);
  localparam int MAXH = N + 1;
  localparam int W    = 2 * N;

  // Every stage keeps its own column arrays, so the stages form a plain
  // chain of separate nets.
  // init_v[c][k]: bit k of column c of the initial matrix.
  // g_stage[s].nxt[c][k]: bit k of column c after stage s.
  // g_stage[s].cy[c][k]: carry k produced in column c by stage s.

  // Initial matrix: partial products ordered by row, then constant one.
  wire [MAXH-1:0] init_v [W];

  for (genvar c = 0; c < W; c++) begin : g_init
    localparam int H0  = init_height(N, SIGNED, c);
    localparam int JLO = (c > N - 1) ? c - (N - 1) : 0;
    localparam int JHI = (c < N - 1) ? c : N - 1;
    for (genvar j = JLO; j <= JHI; j++) begin : g_pp
      assign init_v[c][j - JLO] = pp[j][c - j];
    end
    if (SIGNED && (c == N || c == W - 1)) begin : g_one
      assign init_v[c][H0 - 1] = 1'b1;
    end
    for (genvar k = H0; k < MAXH; k++) begin : g_zero
      assign init_v[c][k] = 1'b0;
    end
  end

  // Reduction stages.
  for (genvar s = 0; s < NST; s++) begin : g_stage
    wire [MAXH-1:0] cur [W];
    wire [MAXH-1:0] nxt [W];
    wire [MAXH-1:0] cy  [W];

    if (s == 0) begin : g_from_init
      assign cur = init_v;
    end else begin : g_from_prev
      assign cur = g_stage[s-1].nxt;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int F   = n_fa(N, SIGNED, s, c);
      localparam int A   = n_ha(N, SIGNED, s, c);
      localparam int P   = n_pass(N, SIGNED, s, c);
      localparam int CIN = (c == 0) ? 0 : n_fa(N, SIGNED, s, c - 1) + n_ha(N, SIGNED, s, c - 1);
      localparam int HN  = height(N, SIGNED, s + 1, c);

      for (genvar f = 0; f < F; f++) begin : g_fa
        tgm_full_adder u_fa (
          .a (cur[c][3*f]),
          .b (cur[c][3*f+1]),
          .ci(cur[c][3*f+2]),
          .s (nxt[c][f]),
          .co(cy[c][f])
        );
      end

      if (A == 1) begin : g_ha
        tgm_half_adder u_ha (
          .a (cur[c][3*F]),
          .b (cur[c][3*F+1]),
          .s (nxt[c][F]),
          .co(cy[c][F])
        );
      end

      if (P == 1) begin : g_pass
        assign nxt[c][F + A] = cur[c][3*F];
      end

      for (genvar k = 0; k < CIN; k++) begin : g_cin
        assign nxt[c][F + A + P + k] = cy[c-1][k];
      end

      for (genvar k = HN; k < MAXH; k++) begin : g_zero
        assign nxt[c][k] = 1'b0;
      end
      for (genvar k = F + A; k < MAXH; k++) begin : g_cyzero
        assign cy[c][k] = 1'b0;
      end
    end
  end

  // At most two bits are left per column: bit 0 and bit 1 form the rows.
  for (genvar c = 0; c < W; c++) begin : g_out
    if (NST == 0) begin : g_direct
      assign sum_row[c]   = init_v[c][0];
      assign carry_row[c] = init_v[c][1];
    end else begin : g_reduced
      assign sum_row[c]   = g_stage[NST-1].nxt[c][0];
      assign carry_row[c] = g_stage[NST-1].nxt[c][1];
    end
  end

  // The schedule must end with at most two bits per column.
  for (genvar c = 0; c < W; c++) begin : g_chk
    if (height(N, SIGNED, NST, c) > 2) begin : g_bad
      $error("tgm_wallace_matrix: column %0d not reduced to two bits", c);
    end
  end
  if (N > MAX_WIDTH) begin : g_too_wide
    $error("tgm_wallace_matrix: N above MAX_WIDTH");
  end
endmodule
