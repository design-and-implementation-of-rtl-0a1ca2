// Partial-product generator of the 8x8 unsigned multiplier: an array of 64
// AND gates, pp[j][i] = b[j] & a[i], of weight 2**(i+j). Row j is operand a
// gated by bit j of b. Combinational only.
module pp_gen
  import dadda_pkg::*;
(
  input  operand_t  a,
  input  operand_t  b,
  output pp_array_t pp
);
  always_comb begin
    for (int j = 0; j < OP_W; j++)
      for (int i = 0; i < OP_W; i++)
        pp[j][i] = b[j] & a[i];
  end
endmodule
