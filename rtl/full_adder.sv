// Full adder: {carry, sum} = a + b + c.
// Purely combinational. Used in the reduction tree, as the two halves of the
// exact 4-2 compressor, and as the cell of the ripple-carry final adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
