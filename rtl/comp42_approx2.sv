// Approximate 4-2 compressor, Design 2.
//
// Design 2 swaps the roles of carry and cout of Design 1: carry takes the
// equation Design 1 uses for cout, and cout becomes equal to cin. Because the
// first compressor of every row in the tree has cin = 0, every cout and cin
// in the tree is then 0, so both ports are dropped and the cell is a pure
// four-input, two-output function:
//     carry' = (x1 | x2) & (x3 | x4)
//     sum'   = (x1 ~^ x2) | (x3 ~^ x4)
// intended to approximate x1 + x2 + x3 + x4 = sum' + 2*carry'. It is wrong in
// 4 of the 16 input states (0000, 1100, 0011 and 1111). The equations are the
// Design 1 equations with cin = 0, which is how this implementation reads the
// design's description. Combinational, no clock.
module comp42_approx2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  assign carry = (x1 | x2) & (x3 | x4);
  assign sum   = ~(x1 ^ x2) | ~(x3 ^ x4);
endmodule
