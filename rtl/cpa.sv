// Exact carry-propagation adder for the last step of the multiplier.
//
// Adds the two rows left by the reduction tree: {cout, s} = x + y. Written as
// a ripple-carry chain of W full adders with a zero carry-in; the design only
// asks for an exact final adder, so the ripple structure is this
// implementation's (smallest) choice. W defaults to the 15 partial-product
// columns of the 8x8 multiplier, giving a 16-bit product with cout as its top
// bit. Combinational, no clock.
module cpa #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .c(c[i]), .sum(s[i]), .carry(c[i+1]));
  end
  assign cout = c[W];
endmodule
