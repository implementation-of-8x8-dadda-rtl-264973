// Two-stage Dadda carry-save reduction tree of the 8x8 multiplier.
//
// Reduces the 8x8 partial-product matrix (column heights 1,2,...,8,...,2,1
// over 15 columns) to two rows, using half adders (HA), full adders (FA) and
// 4-2 compressors (C) of the kind chosen by KIND:
//
//   stage 1, to at most four bits per column:
//     2 HA, 2 FA, 8 C
//     col 4 HA | col 5 C | col 6 C+HA | col 7 C,C | col 8 C,C | col 9 C+FA
//     col 10 C | col 11 FA
//   stage 2, to at most two bits per column:
//     1 HA, 1 FA, 10 C
//     col 2 HA | cols 3..12 one C each, chained cout -> cin | col 13 FA
//
// The cell counts per stage and the positions of the compressors (stage 1:
// columns 5..10 plus a second row in 7 and 8; stage 2: columns 3..12) follow
// the design's reduction diagram. Which bit enters which cell pin, and where
// the half-adder and full-adder carries go, is this implementation's choice,
// made so that every compressor chain starts with cin = 0 and no HA or FA
// carry ever enters a cin pin: for Design 2, whose cin/cout are dropped, no
// bit of the matrix is then lost. The bits of one column are taken in
// partial-product row order (row 0 first).
//
// With KIND = COMP_EXACT the two rows always add up to a*b exactly.
// Some row bits are plain wires or constants by construction: row0[0],
// row0[1], row1[1], row1[2] and row0[14] are partial products that need no
// reduction, row1[0] is always 0, and with Design 1 row1[4] is 0 too (it is
// the carry of the first stage-2 compressor, whose cin is 0 and whose carry
// equals its cin).
// Combinational, no clock.
module dadda_tree
  import dadda_pkg::*;
#(
  parameter comp_kind_e KIND = COMP_DESIGN1
) (
  input  logic [OP_W-1:0][OP_W-1:0] pp,     // pp[j][i] has weight 2^(i+j)
  output logic [NCOLS-1:0]          row0,   // first output row, bit k weight 2^k
  output logic [NCOLS-1:0]          row1    // second output row
);
  // ---------------------------------------------------------------------------
  // Partial products sorted by column: pc[k][n] is the n-th bit of column k,
  // counting from partial-product row 0 upwards. Unused positions are 0.
  // ---------------------------------------------------------------------------
  logic [OP_W-1:0] pc [NCOLS];

  always_comb begin
    for (int k = 0; k < NCOLS; k++) begin
      pc[k] = '0;
      for (int j = 0; j < OP_W; j++) begin
        if (k - j >= 0 && k - j < OP_W)
          pc[k][j - ((k >= OP_W) ? (k - OP_W + 1) : 0)] = pp[j][k - j];
      end
    end
  end

  // ---------------------------------------------------------------------------
  // Stage 1: height 8 -> 4. s1[k] holds the (at most four) bits of column k.
  // ---------------------------------------------------------------------------
  logic [3:0] s1 [NCOLS];

  logic ha4_s, ha4_c, ha6_s, ha6_c;
  logic fa9_s, fa9_c, fa11_s, fa11_c;
  logic c5_s,  c5_ca,  c5_co;
  logic c6_s,  c6_ca,  c6_co;
  logic c7a_s, c7a_ca, c7a_co;
  logic c7b_s, c7b_ca, c7b_co;
  logic c8a_s, c8a_ca, c8a_co;
  logic c8b_s, c8b_ca, c8b_co;
  logic c9_s,  c9_ca,  c9_co;
  logic c10_s, c10_ca, c10_co;

  // column 4 (5 bits)
  half_adder u_s1_ha4 (.a(pc[4][0]), .b(pc[4][1]), .sum(ha4_s), .carry(ha4_c));
  // column 5 (6 bits + HA carry)
  comp42 #(.KIND(KIND)) u_s1_c5 (
    .x1(pc[5][0]), .x2(pc[5][1]), .x3(pc[5][2]), .x4(pc[5][3]), .cin(1'b0),
    .sum(c5_s), .carry(c5_ca), .cout(c5_co));
  // column 6 (7 bits + C5 carry, C5 cout)
  comp42 #(.KIND(KIND)) u_s1_c6 (
    .x1(pc[6][0]), .x2(pc[6][1]), .x3(pc[6][2]), .x4(pc[6][3]), .cin(c5_co),
    .sum(c6_s), .carry(c6_ca), .cout(c6_co));
  half_adder u_s1_ha6 (.a(pc[6][4]), .b(pc[6][5]), .sum(ha6_s), .carry(ha6_c));
  // column 7 (8 bits + C6 carry, HA6 carry, C6 cout)
  comp42 #(.KIND(KIND)) u_s1_c7a (
    .x1(pc[7][0]), .x2(pc[7][1]), .x3(pc[7][2]), .x4(pc[7][3]), .cin(c6_co),
    .sum(c7a_s), .carry(c7a_ca), .cout(c7a_co));
  comp42 #(.KIND(KIND)) u_s1_c7b (
    .x1(pc[7][4]), .x2(pc[7][5]), .x3(pc[7][6]), .x4(pc[7][7]), .cin(1'b0),
    .sum(c7b_s), .carry(c7b_ca), .cout(c7b_co));
  // column 8 (7 bits + two carries, two couts)
  comp42 #(.KIND(KIND)) u_s1_c8a (
    .x1(pc[8][0]), .x2(pc[8][1]), .x3(pc[8][2]), .x4(pc[8][3]), .cin(c7a_co),
    .sum(c8a_s), .carry(c8a_ca), .cout(c8a_co));
  comp42 #(.KIND(KIND)) u_s1_c8b (
    .x1(pc[8][4]), .x2(pc[8][5]), .x3(pc[8][6]), .x4(c7a_ca), .cin(c7b_co),
    .sum(c8b_s), .carry(c8b_ca), .cout(c8b_co));
  // column 9 (6 bits + two carries, two couts)
  comp42 #(.KIND(KIND)) u_s1_c9 (
    .x1(pc[9][0]), .x2(pc[9][1]), .x3(pc[9][2]), .x4(pc[9][3]), .cin(c8a_co),
    .sum(c9_s), .carry(c9_ca), .cout(c9_co));
  full_adder u_s1_fa9 (.a(pc[9][4]), .b(pc[9][5]), .c(c8b_co), .sum(fa9_s), .carry(fa9_c));
  // column 10 (5 bits + C9 carry, FA9 carry, C9 cout)
  comp42 #(.KIND(KIND)) u_s1_c10 (
    .x1(pc[10][0]), .x2(pc[10][1]), .x3(pc[10][2]), .x4(pc[10][3]), .cin(c9_co),
    .sum(c10_s), .carry(c10_ca), .cout(c10_co));
  // column 11 (4 bits + C10 carry, C10 cout)
  full_adder u_s1_fa11 (.a(pc[11][0]), .b(pc[11][1]), .c(c10_co), .sum(fa11_s), .carry(fa11_c));

  always_comb begin
    for (int k = 0; k < NCOLS; k++) s1[k] = '0;
    s1[0]  = {3'b000, pc[0][0]};
    s1[1]  = {2'b00,  pc[1][1:0]};
    s1[2]  = {1'b0,   pc[2][2:0]};
    s1[3]  = pc[3][3:0];
    s1[4]  = {ha4_s,  pc[4][4:2]};
    s1[5]  = {c5_s,   ha4_c, pc[5][5:4]};
    s1[6]  = {ha6_s,  c6_s,  c5_ca, pc[6][6]};
    s1[7]  = {c7b_s,  c7a_s, ha6_c, c6_ca};
    s1[8]  = {1'b0,   c8b_s, c8a_s, c7b_ca};
    s1[9]  = {fa9_s,  c9_s,  c8b_ca, c8a_ca};
    s1[10] = {c10_s,  fa9_c, c9_ca, pc[10][4]};
    s1[11] = {fa11_s, c10_ca, pc[11][3:2]};
    s1[12] = {fa11_c, pc[12][2:0]};
    s1[13] = {2'b00,  pc[13][1:0]};
    s1[14] = {3'b000, pc[14][0]};
  end

  // ---------------------------------------------------------------------------
  // Stage 2: height 4 -> 2. One compressor per column 3..12, chained through
  // cout -> cin; each column keeps its own sum and the carry of the column
  // below.
  // ---------------------------------------------------------------------------
  logic ha2_s, ha2_c, fa13_s, fa13_c;
  logic [12:3] c2_s, c2_ca, c2_co;   // indexed by column

  half_adder u_s2_ha2 (.a(s1[2][0]), .b(s1[2][1]), .sum(ha2_s), .carry(ha2_c));

  for (genvar k = 3; k <= 12; k++) begin : g_s2
    comp42 #(.KIND(KIND)) u_c (
      .x1(s1[k][0]), .x2(s1[k][1]), .x3(s1[k][2]), .x4(s1[k][3]),
      .cin((k == 3) ? 1'b0 : c2_co[(k == 3) ? 3 : k - 1]),
      .sum(c2_s[k]), .carry(c2_ca[k]), .cout(c2_co[k]));
  end

  full_adder u_s2_fa13 (.a(s1[13][0]), .b(s1[13][1]), .c(c2_co[12]),
                        .sum(fa13_s), .carry(fa13_c));

  always_comb begin
    row0 = '0;
    row1 = '0;
    row0[0] = s1[0][0];
    row0[1] = s1[1][0];
    row1[1] = s1[1][1];
    row0[2] = ha2_s;
    row1[2] = s1[2][2];
    row0[3] = c2_s[3];
    row1[3] = ha2_c;
    for (int k = 4; k <= 12; k++) begin
      row0[k] = c2_s[k];
      row1[k] = c2_ca[k-1];
    end
    row0[13] = fa13_s;
    row1[13] = c2_ca[12];
    row0[14] = s1[14][0];
    row1[14] = fa13_c;
  end
endmodule
