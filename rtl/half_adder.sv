// Half adder: sum = a ^ b, carry = a & b.
// Purely combinational. Used in both stages of the Dadda reduction tree.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
