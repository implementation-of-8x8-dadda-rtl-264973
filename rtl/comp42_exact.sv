// Exact 4-2 compressor.
//
// Takes four bits x1..x4 of one column plus a carry-in cin from the compressor
// of the next lower column and produces sum (same weight), carry and cout
// (both of twice the weight) such that
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// Built, as is usual, from two cascaded full adders: the first adds x1..x3
// and yields cout, which therefore never depends on cin (so a row of these
// compressors has no rippling carry chain); the second adds the first sum, x4
// and cin and yields sum and carry. The port names follow the block symbol of
// the design (X1..X4, Cin, Cout, Carry, Sum); the internal split into two full
// adders is this implementation's choice. Combinational, no clock.
module comp42_exact (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s_mid;

  full_adder u_fa_hi (.a(x1),    .b(x2), .c(x3),  .sum(s_mid), .carry(cout));
  full_adder u_fa_lo (.a(s_mid), .b(x4), .c(cin), .sum(sum),   .carry(carry));
endmodule
