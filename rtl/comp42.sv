// 4-2 compressor cell of the reduction tree, one of three kinds.
//
// Wraps the exact compressor or one of the two approximate designs behind one
// interface so the tree can be written once. KIND is fixed at elaboration:
//   COMP_EXACT   - comp42_exact
//   COMP_DESIGN1 - comp42_approx1
//   COMP_DESIGN2 - comp42_approx2; it has no cin/cout, so cin is not used and
//                  cout is 0 (Design 2 defines cout as equal to cin, and every
//                  cin in the tree is either 0 or another compressor's cout).
// Port meaning and weights as in comp42_exact. Combinational, no clock.
module comp42
  import dadda_pkg::*;
#(
  parameter comp_kind_e KIND = COMP_DESIGN1
) (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (KIND == COMP_EXACT) begin : g_exact
    comp42_exact u_c (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else if (KIND == COMP_DESIGN1) begin : g_d1
    comp42_approx1 u_c (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else begin : g_d2
    comp42_approx2 u_c (.x1, .x2, .x3, .x4, .sum, .carry);
    assign cout = 1'b0;
    // In a correctly wired tree every Design 2 cin is a constant 0.
    logic unused_cin;
    assign unused_cin = cin;
  end
endmodule
