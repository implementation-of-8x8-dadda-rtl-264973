// Top level: the 8x8 approximate Dadda multiplier in both compressor schemes.
//
// The same operand pair drives three instances of the 8x8 Dadda multiplier
// that differ only in the 4-2 compressors of their reduction tree:
//   p_design1 - all 18 compressors are approximate Design 1
//   p_design2 - all 18 compressors are approximate Design 2
//   p_exact   - all 18 compressors are exact (the reference tree; its result
//               is the exact product a*b)
// Bringing out the exact result next to the two approximate ones lets a
// system, for example an image-processing pipeline that multiplies two
// images pixel by pixel, measure or choose the approximation in place.
// The parallel arrangement of the three trees is this implementation's
// choice. Combinational, no clock.
module dadda_approx_top
  import dadda_pkg::*;
(
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] p_design1,
  output logic [PROD_W-1:0] p_design2,
  output logic [PROD_W-1:0] p_exact
);
  dadda8x8 #(.KIND(COMP_DESIGN1)) u_mul_d1 (.a, .b, .p(p_design1));
  dadda8x8 #(.KIND(COMP_DESIGN2)) u_mul_d2 (.a, .b, .p(p_design2));
  dadda8x8 #(.KIND(COMP_EXACT))   u_mul_ex (.a, .b, .p(p_exact));
endmodule
