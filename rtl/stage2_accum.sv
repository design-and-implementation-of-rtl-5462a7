// Stage 2: weighted-input summation for one neuron.
//
// The products arrive in sign-magnitude form, so rather than adding signed
// numbers the stage sorts them by sign into two unsigned accumulators, one for
// the positive and one for the negative weighted inputs (four accumulators for
// the two neurons). When the zero-byte of the current memory half arrives the
// negative sum is subtracted from the positive one, giving the neuron sum Y
// (equations (1) and (2), bias included as the last product), and both
// accumulators are cleared for the next half (weights w + h). clr also clears
// them, at the start of a training run.
//
// Y is two's complement in 1/256 units (eight fraction bits). The
// accumulator width is sized for 127 products of the largest magnitude.
//
// Timing: p_valid/zero_byte at clock n, y and y_valid (one-clock pulse) at
// n+1; half is passed along with y.
module stage2_accum
  import nn_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  prod_t                 p,
  input  logic                  p_valid,
  input  logic                  zero_byte,
  input  logic                  half_in,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid,
  output logic                  y_half
);

  logic [ACC_W-1:0] acc_pos, acc_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_pos <= '0;
      acc_neg <= '0;
      y       <= '0;
      y_valid <= 1'b0;
      y_half  <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (clr) begin
        acc_pos <= '0;
        acc_neg <= '0;
      end else if (zero_byte) begin
        y       <= signed'({1'b0, acc_pos}) - signed'({1'b0, acc_neg});
        y_valid <= 1'b1;
        y_half  <= half_in;
        acc_pos <= '0;
        acc_neg <= '0;
      end else if (p_valid) begin
        if (p.s) acc_neg <= acc_neg + ACC_W'(p.mag);
        else     acc_pos <= acc_pos + ACC_W'(p.mag);
      end
    end
  end

endmodule
