// Partial-product generator of the 8x8 unsigned multiplier.
//
// One AND gate per bit pair: pp[j][i] = a[i] & b[j], a bit of weight 2^(i+j).
// Row j of pp is operand a gated by bit j of operand b. 64 AND gates,
// combinational, no clock.
module pp_gen
  import dadda_pkg::*;
(
  input  logic [OP_W-1:0]            a,
  input  logic [OP_W-1:0]            b,
  output logic [OP_W-1:0][OP_W-1:0]  pp
);
  always_comb begin
    for (int j = 0; j < OP_W; j++)
      pp[j] = a & {OP_W{b[j]}};
  end
endmodule
