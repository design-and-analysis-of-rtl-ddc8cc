// 8x8 unsigned approximate multiplier built on 4-2 compressors.
//
// The 64 partial products a[m] & b[n] are reduced in two compressor stages to
// two rows, which a carry-propagate adder sums. Column c (weight 2^c) of the
// dot diagram holds min(c+1, 15-c) bits. The layout of the two stages follows
// the reference dot diagram of the design:
//
//   stage 1 (heights 1..8..1 -> at most 4 per column)
//     col 4: half adder;  col 5: compressor;  col 6: compressor + half adder;
//     col 7: two compressors;  col 8: compressor + full adder;
//     col 9: compressor + half adder;  col 10: compressor;
//     col 11: full adder whose third input is the carry-out of col 10.
//     The exact compressors of cols 8-10 form a carry chain that starts at 0.
//   stage 2 (at most 4 per column -> at most 2)
//     col 2: half adder;  cols 3-12: one compressor each, carry chain from 0
//     at col 3;  col 13: full adder taking the carry-out of col 12.
//
// Every compressor site in a column below W is approximate, the rest exact;
// half and full adders are always exact. KIND = MUL_PM puts positive (PC)
// compressors in the approximate part, giving the positive multiplier (PM);
// MUL_NM puts negative (NC) ones there, giving the negative multiplier (NM).
// W = 8 is the split drawn in the reference diagram (compressors in columns
// 0-7 approximate); W >= 13 makes every compressor approximate, which is the
// W = 16 setting the MAC is evaluated with. W below 8 is rejected: stage-1
// compressors of columns 5-7 would then need a carry chain the layout has no
// room for.
//
// Interface: a, b unsigned 8-bit operands; p the 16-bit approximate product.
// Any operand that is zero or a power of two gives the exact product.
// Combinational, no clock.
//
// The layout, the W split and the PC/NC choice follow the published design.
// The order in which a column's dots enter the cells (by multiplier bit
// index n, b[0] first) is this implementation's choice; the approximate
// compressors are not symmetric, so it affects individual products, though
// not their totals over all operand pairs.
module approx_mult
  import mac_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter mult_kind_e  KIND = MUL_PM
) (
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] p
);

  localparam int unsigned NCOL = 2 * OP_W - 1;  // 15 partial-product columns

  if (W < 8) begin : g_bad_w
    $error("approx_mult: W must be at least 8");
  end

  // ---------------------------------------------------------------- partial products
  logic [OP_W-1:0][OP_W-1:0] pp;   // pp[n][m], weight 2^(m+n)
  logic [7:0]                col [NCOL];  // col[c][j]: j-th bit of column c

  pp_gen u_pp (.a(a), .b(b), .pp(pp));

  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      col[c] = '0;
      for (int n = 0; n < OP_W; n++)
        if (c - n >= 0 && c - n < OP_W)
          col[c][n - ((c > OP_W - 1) ? c - (OP_W - 1) : 0)] = pp[n][c-n];
    end
  end

  // ---------------------------------------------------------------- stage 1
  logic [3:0] r1 [NCOL];   // stage-1 result, at most four bits per column

  logic ha4_s, ha4_c, ha6_s, ha6_c, ha9_s, ha9_c, fa8_s, fa8_c, fa11_s, fa11_c;
  logic c5_s, c5_y, c5_z, c6_s, c6_y, c6_z;
  logic c7a_s, c7a_y, c7a_z, c7b_s, c7b_y, c7b_z;
  logic c8_s, c8_y, c8_z, c9_s, c9_y, c9_z, c10_s, c10_y, c10_z;

  half_adder u_s1_ha4 (.a(col[4][0]), .b(col[4][1]), .sum(ha4_s), .carry(ha4_c));

  tree_compressor #(.COL(5), .W(W), .KIND(KIND)) u_s1_c5
    (.x(col[5][3:0]), .cin(1'b0), .sum(c5_s), .carry(c5_y), .cout(c5_z));

  tree_compressor #(.COL(6), .W(W), .KIND(KIND)) u_s1_c6
    (.x(col[6][3:0]), .cin(1'b0), .sum(c6_s), .carry(c6_y), .cout(c6_z));
  half_adder u_s1_ha6 (.a(col[6][4]), .b(col[6][5]), .sum(ha6_s), .carry(ha6_c));

  tree_compressor #(.COL(7), .W(W), .KIND(KIND)) u_s1_c7a
    (.x(col[7][3:0]), .cin(1'b0), .sum(c7a_s), .carry(c7a_y), .cout(c7a_z));
  tree_compressor #(.COL(7), .W(W), .KIND(KIND)) u_s1_c7b
    (.x(col[7][7:4]), .cin(1'b0), .sum(c7b_s), .carry(c7b_y), .cout(c7b_z));

  tree_compressor #(.COL(8), .W(W), .KIND(KIND)) u_s1_c8
    (.x(col[8][3:0]), .cin(1'b0), .sum(c8_s), .carry(c8_y), .cout(c8_z));
  full_adder u_s1_fa8 (.a(col[8][4]), .b(col[8][5]), .c(col[8][6]), .sum(fa8_s), .carry(fa8_c));

  tree_compressor #(.COL(9), .W(W), .KIND(KIND)) u_s1_c9
    (.x(col[9][3:0]), .cin(c8_z), .sum(c9_s), .carry(c9_y), .cout(c9_z));
  half_adder u_s1_ha9 (.a(col[9][4]), .b(col[9][5]), .sum(ha9_s), .carry(ha9_c));

  tree_compressor #(.COL(10), .W(W), .KIND(KIND)) u_s1_c10
    (.x(col[10][3:0]), .cin(c9_z), .sum(c10_s), .carry(c10_y), .cout(c10_z));

  full_adder u_s1_fa11 (.a(col[11][0]), .b(col[11][1]), .c(c10_z), .sum(fa11_s), .carry(fa11_c));

  // Columns 5-7 are always approximate (W >= 8), so their carry-outs are 0.
  logic unused_s1;
  assign unused_s1 = c5_z | c6_z | c7a_z | c7b_z;

  assign r1[0]  = {3'b000, col[0][0]};
  assign r1[1]  = {2'b00, col[1][1:0]};
  assign r1[2]  = {1'b0, col[2][2:0]};
  assign r1[3]  = col[3][3:0];
  assign r1[4]  = {col[4][4:2], ha4_s};
  assign r1[5]  = {col[5][5:4], c5_s, ha4_c};
  assign r1[6]  = {col[6][6], ha6_s, c6_s, c5_y};
  assign r1[7]  = {c7b_s, c7a_s, ha6_c, c6_y};
  assign r1[8]  = {fa8_s, c8_s, c7b_y, c7a_y};
  assign r1[9]  = {ha9_s, c9_s, fa8_c, c8_y};
  assign r1[10] = {col[10][4], c10_s, ha9_c, c9_y};
  assign r1[11] = {col[11][3:2], fa11_s, c10_y};
  assign r1[12] = {col[12][2:0], fa11_c};
  assign r1[13] = {2'b00, col[13][1:0]};
  assign r1[14] = {3'b000, col[14][0]};

  // ---------------------------------------------------------------- stage 2
  logic [NCOL-1:0] row_x, row_y;       // the two rows left for the final adder
  logic [13:3]     s2_y;               // s2_y[c]: carry bit entering column c
  logic [12:2]     s2_z;               // s2_z[c]: carry-out of the compressor in column c
  logic            ha2_s;
  logic            fa13_s, fa13_c;

  half_adder u_s2_ha2 (.a(r1[2][0]), .b(r1[2][1]), .sum(ha2_s), .carry(s2_y[3]));

  assign s2_z[2] = 1'b0;

  for (genvar c = 3; c <= 12; c++) begin : g_s2
    tree_compressor #(.COL(c), .W(W), .KIND(KIND)) u_c
      (.x(r1[c]), .cin(s2_z[c-1]), .sum(row_x[c]), .carry(s2_y[c+1]), .cout(s2_z[c]));
  end

  full_adder u_s2_fa13 (.a(r1[13][0]), .b(r1[13][1]), .c(s2_z[12]),
                        .sum(fa13_s), .carry(fa13_c));

  assign row_x[0]  = r1[0][0];
  assign row_y[0]  = 1'b0;
  assign row_x[1]  = r1[1][0];
  assign row_y[1]  = r1[1][1];
  assign row_x[2]  = ha2_s;
  assign row_y[2]  = r1[2][2];
  assign row_y[12:3] = s2_y[12:3];
  assign row_x[13] = fa13_s;
  assign row_y[13] = s2_y[13];
  assign row_x[14] = r1[14][0];
  assign row_y[14] = fa13_c;

  // Zero padding of the short stage-1 columns is never read.
  logic unused_tree;
  assign unused_tree = ^{r1[0][3:1], r1[1][3:2], r1[2][3], r1[13][3:2], r1[14][3:1]};

  // ---------------------------------------------------------------- final addition
  final_adder #(.WIDTH(NCOL)) u_cpa (.x(row_x), .y(row_y), .s(p));

endmodule
