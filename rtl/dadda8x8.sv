// 8x8 unsigned Dadda multiplier with a selectable kind of 4-2 compressor.
//
// Three parts, as in a conventional fast multiplier:
//   1. pp_gen     - 64 AND gates form the partial-product matrix;
//   2. dadda_tree - a two-stage carry-save tree of half adders, full adders
//                   and 4-2 compressors reduces it to two rows;
//   3. cpa        - an exact ripple-carry adder adds the two rows.
// Only part 2 is approximate: KIND selects the exact compressor, Design 1 or
// Design 2 for all 18 compressors of the tree. Design 1 is the default.
// Half adders, full adders and the final adder are always exact.
// Interface: p = a * b (exactly for COMP_EXACT, approximately otherwise).
// Combinational, no clock: the product settles one tree-plus-adder delay
// after the operands.
module dadda8x8
  import dadda_pkg::*;
#(
  parameter comp_kind_e KIND = COMP_DESIGN1
) (
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] p
);
  logic [OP_W-1:0][OP_W-1:0] pp;
  logic [NCOLS-1:0]          row0, row1;

  pp_gen u_pp (.a, .b, .pp);

  dadda_tree #(.KIND(KIND)) u_tree (.pp, .row0, .row1);

  cpa #(.W(NCOLS)) u_cpa (.x(row0), .y(row1), .s(p[NCOLS-1:0]), .cout(p[PROD_W-1]));
endmodule
