// Weight update w_new = w - dE/dw for one weight.
//
// The training rule is w(t+1) = w(t) - eta * dE/dw with the learning rate eta
// fixed at 1, so no multiplier is needed: the derivative coming from stage 4
// (two's complement, 1/16 units, the same scale as a weight) is subtracted
// from the weight read out of memory. The difference saturates at
// +/-7.9375, the ends of the S DDD.FFFF range, and is turned back into sign-
// magnitude. A result of zero is given the minus sign (8'h80), so that the
// 16-bit word written back can never equal the all-zero end-of-vector marker.
// The saturation and the minus-zero rule are this implementation's choices.
//
// Combinational.
module weight_update
  import nn_pkg::*;
(
  input  sm8_t                     w,
  input  logic signed [DER_W-1:0]  der,
  output sm8_t                     w_new
);

  localparam logic signed [DER_W+1:0] MAXV = (DER_W+2)'((1 << MAG_W) - 1);

  logic signed [DER_W+1:0] diff;

  always_comb begin
    diff = (DER_W+2)'(sm_to_int(w)) - (DER_W+2)'(der);
    if (diff > MAXV)        w_new = '{s: 1'b0, mag: MAG_W'(MAXV)};
    else if (diff < -MAXV)  w_new = '{s: 1'b1, mag: MAG_W'(MAXV)};
    else if (diff < 0)      w_new = '{s: 1'b1, mag: MAG_W'(-diff)};
    else if (diff == 0)     w_new = '{s: 1'b1, mag: '0};
    else                    w_new = '{s: 1'b0, mag: MAG_W'(diff)};
  end

endmodule
