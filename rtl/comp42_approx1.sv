// Approximate 4-2 compressor, Design 1.
//
// Same interface and weights as the exact compressor, but three simplified
// output functions:
//     carry' = cin
//     cout'  = (x1 | x2) & (x3 | x4)
//     sum'   = ~cin & ((x1 ~^ x2) | (x3 ~^ x4))
// The carry output of an exact compressor equals cin in 24 of the 32 input
// states, so carry' is reduced to a wire. Cout' and sum' are chosen to pull
// the result back towards the exact count; sum' is forced to 0 whenever cin
// is 1. Over the 32 input states 12 results differ from the exact compressor,
// each by exactly 1.
//
// Gate structure (all two-input gates): cout' is NOR(NOR(x1,x2), NOR(x3,x4));
// sum' is NOR(NOR(XNOR(x1,x2), XNOR(x3,x4)), cin). The carry' = cin wire and
// the two pair-wise groupings (x1,x2) and (x3,x4) follow the design's gate
// diagram; the exact equations of cout' and sum' are this implementation's
// reading of it. Combinational, no clock.
module comp42_approx1 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic nor12, nor34, xnor12, xnor34, nor_x;

  assign nor12  = ~(x1 | x2);
  assign nor34  = ~(x3 | x4);
  assign cout   = ~(nor12 | nor34);

  assign xnor12 = ~(x1 ^ x2);
  assign xnor34 = ~(x3 ^ x4);
  assign nor_x  = ~(xnor12 | xnor34);
  assign sum    = ~(nor_x | cin);

  assign carry  = cin;
endmodule
