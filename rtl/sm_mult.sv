// 8x8 sign-magnitude multiplier for S DDD.FFFF operands.
//
// The product sign is the exclusive-or of the operand signs and its
// magnitude the 7x7-bit product of the magnitudes, 14 bits with eight
// fraction bits (1/256 units). Stage 1 holds two of these, one per neuron,
// working in parallel. Purely combinational; the stage that uses it
// registers the result.
module sm_mult
  import nn_pkg::*;
(
  input  sm8_t  a,
  input  sm8_t  b,
  output prod_t p
);

  always_comb begin
    p.s   = a.s ^ b.s;
    p.mag = PROD_W'(a.mag) * PROD_W'(b.mag);
  end

endmodule
