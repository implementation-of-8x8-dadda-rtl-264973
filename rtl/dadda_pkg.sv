// Shared definitions for the approximate Dadda multiplier.
//
// comp_kind_e selects which 4-2 compressor the reduction tree is built from:
//   COMP_EXACT   - the exact compressor (two cascaded full adders)
//   COMP_DESIGN1 - approximate Design 1: carry = cin, simplified sum and cout
//   COMP_DESIGN2 - approximate Design 2: no cin/cout, carry takes Design 1's
//                  cout equation
// The operand width of the multiplier (8) and the product width (16) are the
// sizes the design is described for; the tree wiring is specific to them.
package dadda_pkg;

  typedef enum logic [1:0] {
    COMP_EXACT   = 2'd0,
    COMP_DESIGN1 = 2'd1,
    COMP_DESIGN2 = 2'd2
  } comp_kind_e;

  localparam int unsigned OP_W   = 8;             // multiplier operand width
  localparam int unsigned PROD_W = 2 * OP_W;      // product width
  localparam int unsigned NCOLS  = 2 * OP_W - 1;  // partial-product columns

endpackage
