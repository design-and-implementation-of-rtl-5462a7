// Stage 4: error sum, derivative and iteration count.
//
// The two neurons' squared errors arrive together, once for the weights w
// (first memory half) and once for the weights w + h (second half). The
// first pair is summed into E = E1 + E2 and held; the second gives
// Eh = Eh1 + Eh2. The derivative is then dE/dw = (Eh - E) / (2h): with the
// division by two of the error deferred to here and h = 0.5 the divisor is
// one, so the subtraction is the whole computation. It is converted from the
// 1/256 units of the errors to the 1/16 units of a weight (rounded to
// nearest) and handed to stage 1 with a one-clock der_valid pulse, together
// with the iteration count and the stop decision: training stops when E is
// at or below err_goal (the network has learned) or when MAX_ITER
// iterations have run. A start pulse clears the count, the derivative
// and the flags, so the first iteration of a run uses the stored weights
// unchanged.
//
// Rounding, the err_goal comparison on E and the clearing on start are this
// implementation's choices; the limit of 50 iterations is the design's.
//
// Timing: der_valid one clock after the second-half e_valid.
module stage4_deriv
  import nn_pkg::*;
#(
  parameter int unsigned MAX_ITER = 50
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [SQ_W-1:0]         e1_sq,
  input  logic [SQ_W-1:0]         e2_sq,
  input  logic                    e_valid,
  input  logic                    e_half,
  input  logic [ESUM_W-1:0]       err_goal,
  output logic [ESUM_W-1:0]       e_sum,      // E  of the last iteration, 1/256
  output logic [ESUM_W-1:0]       eh_sum,     // Eh of the last iteration, 1/256
  output logic signed [DER_W-1:0] der,        // dE/dw, 1/16 units
  output logic                    der_valid,
  output logic [ITER_W-1:0]       iter,
  output logic                    stop,       // last iteration (with der_valid)
  output logic                    converged,
  output logic                    done
);

  logic [ESUM_W-1:0]       sum;
  logic signed [ESUM_W:0]  diff;
  logic signed [ESUM_W:0]  der_r;
  logic                    conv_now, stop_now;

  always_comb begin
    sum      = ESUM_W'(e1_sq) + ESUM_W'(e2_sq);
    diff     = signed'({1'b0, sum}) - signed'({1'b0, e_sum});
    der_r    = (diff + (ESUM_W+1)'(1 << (FRAC - 1))) >>> FRAC;
    conv_now = (e_sum <= err_goal);
    stop_now = conv_now || (iter + 1'b1 >= ITER_W'(MAX_ITER));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_sum <= '0; eh_sum <= '0; der <= '0; der_valid <= 1'b0;
      iter <= '0; stop <= 1'b0; converged <= 1'b0; done <= 1'b0;
    end else begin
      der_valid <= 1'b0;
      if (start) begin
        der <= '0; iter <= '0; stop <= 1'b0; converged <= 1'b0; done <= 1'b0;
      end else if (e_valid && !e_half) begin
        e_sum <= sum;
      end else if (e_valid && e_half) begin
        eh_sum    <= sum;
        der       <= DER_W'(der_r);
        der_valid <= 1'b1;
        iter      <= iter + 1'b1;
        stop      <= stop_now;
        converged <= conv_now;
        done      <= stop_now;
      end
    end
  end

endmodule
