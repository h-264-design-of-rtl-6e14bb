// Common operations unit (COU).
//
// Computes F(W, X, Y, Z, alpha) = (W + X + Y + Z + 2) >> alpha, the one
// operation every intra prediction mode is written in. Following the
// structure of the design it is a tree of four adders (W+X, Y+Z, their sum,
// then +2) and one arithmetic right shifter. The unit also holds the single
// multiplier of the circuit; when mul_en is set the X operand is multiplied
// by the signed coefficient coef before it enters the adder tree (used by
// the plane modes for (i+1)*diff, 5*H, 34*H, 16*(..), B*(x-7) and C*(y-7)).
// Placing the multiplier on the X input is this design's own choice.
//
// Operands are 22-bit signed; the shift is arithmetic, so negative
// intermediates (H, V, B, C) round toward minus infinity as in H.264.
// Purely combinational: the result is valid in the same cycle.
module cou
  import intra_pkg::*;
(
  input  cou_t       w,
  input  cou_t       x,
  input  cou_t       y,
  input  cou_t       z,
  input  logic [2:0] alpha,
  input  logic       mul_en,
  input  coef_t      coef,
  output cou_t       f
);

  cou_t x_eff;
  cou_t sum_wx, sum_yz, sum_all, sum_rnd;

  always_comb begin
    x_eff   = mul_en ? cou_t'(x * cou_t'(coef)) : x;
    sum_wx  = w + x_eff;
    sum_yz  = y + z;
    sum_all = sum_wx + sum_yz;
    sum_rnd = sum_all + cou_t'(2);
    f       = sum_rnd >>> alpha;
  end

endmodule
