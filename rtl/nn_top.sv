// Two-neuron single-layer feed-forward network that trains itself.
//
// 125 inputs plus a constant bias input feed two neurons, Y = sum(x*w) + theta,
// o = tanh(Y). The network is trained in hardware with a finite-difference
// rule: every iteration evaluates the network once with the weights w and
// once with every weight raised by h = 0.5, and all weights are then moved by
// the same amount, w <- w - (Eh - E), where E and Eh are the summed squared
// output errors of the two evaluations.
//
// Five stages, all running from one clock:
//   stage1        memories, weight update, two multipliers; contains the
//                 stage-5 sequencer (swap_ctrl) that swaps the weight memories
//   stage2_accum  (x2) positive/negative accumulators, Y on the zero-byte
//   stage3_error  (x2) tanh and target tables, squared error
//   stage4_deriv  E + E, derivative Eh - E, iteration count, stop decision
// The end of each weight vector is marked in memory by an all-zero word (the
// zero-byte), which is what closes each pass through stages 2 and 3; the
// memory address counter is the timer that sequences a whole iteration.
//
// Use: with the network idle, load the input vector, both weight memories of
// each neuron (including their zero-byte words), the tanh tables and the
// target tables through the ld_* port (see nn_pkg::mem_sel_t), then pulse
// start. Training stops after MAX_ITER iterations or as soon as E <= err_goal;
// busy falls and done rises. The trained weights are then in the memory of
// each pair that bank_q designates for reading (A when bank_q = 0). ld_rdata
// returns the word at ld_sel/ld_addr one clock later, while idle.
//
// Timing: one memory address per clock. An iteration is 256 address clocks;
// the derivative leaves stage 4 six clocks after the last zero-byte address
// was issued and the next iteration starts on the clock after that, so
// derivative pulses (and iterations) are 261 clocks apart.
//
// The assertion below is disabled during reset; lint reports that use of
// rst_n as a synchronous one (SYNCASYNCNET). It is not part of the circuit.
module nn_top
  import nn_pkg::*;
#(
  parameter int unsigned MAX_ITER = 50
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [3:0]              t_sel,
  input  logic [ESUM_W-1:0]       err_goal,
  // load / read-back port
  input  logic                    ld_we,
  input  mem_sel_t                ld_sel,
  input  logic [7:0]              ld_addr,
  input  logic [WORD_W-1:0]       ld_wdata,
  output logic [WORD_W-1:0]       ld_rdata,
  // status and results
  output logic                    busy,
  output logic                    done,
  output logic                    converged,
  output logic [ITER_W-1:0]       iter,
  output logic                    bank_q,
  output logic [ESUM_W-1:0]       e_sum,
  output logic [ESUM_W-1:0]       eh_sum,
  output logic signed [DER_W-1:0] der,
  output logic signed [Y_W-1:0]   y1,
  output logic signed [Y_W-1:0]   y2,
  output sm8_t                    o1,
  output sm8_t                    o2
);

  prod_t p1, p2;
  logic  p_valid, zero_byte, half;
  logic  der_valid, stop, start_ok;

  logic signed [Y_W-1:0] y1_s, y2_s;
  logic                  y1_v, y2_v, y1_h, y2_h;
  sm8_t                  o1_s, o2_s, t1_s, t2_s;
  logic [SQ_W-1:0]       e1_sq, e2_sq;
  logic                  e1_v, e2_v, e1_h, e2_h;

  assign start_ok = start && !busy;

  stage1 #(.AW(8)) u_s1 (
    .clk, .rst_n, .start(start_ok), .der, .der_valid, .stop,
    .ld_we, .ld_sel, .ld_addr, .ld_wdata, .ld_rdata,
    .busy, .bank_q, .p1, .p2, .p_valid, .zero_byte, .half
  );

  stage2_accum u_s2_n1 (
    .clk, .rst_n, .clr(start_ok), .p(p1), .p_valid, .zero_byte, .half_in(half),
    .y(y1_s), .y_valid(y1_v), .y_half(y1_h)
  );
  stage2_accum u_s2_n2 (
    .clk, .rst_n, .clr(start_ok), .p(p2), .p_valid, .zero_byte, .half_in(half),
    .y(y2_s), .y_valid(y2_v), .y_half(y2_h)
  );

  logic ld_idle;
  assign ld_idle = ld_we && !busy;

  stage3_error u_s3_n1 (
    .clk, .rst_n, .y(y1_s), .y_valid(y1_v), .y_half(y1_h), .t_sel,
    .tanh_we(ld_idle && ld_sel == MEM_TANH1), .tanh_addr(ld_addr[6:0]),
    .tgt_we(ld_idle && ld_sel == MEM_TGT1),   .tgt_addr(ld_addr[3:0]),
    .tbl_wdata(ld_wdata[7:0]),
    .o(o1_s), .t(t1_s), .e_sq(e1_sq), .e_valid(e1_v), .e_half(e1_h)
  );
  stage3_error u_s3_n2 (
    .clk, .rst_n, .y(y2_s), .y_valid(y2_v), .y_half(y2_h), .t_sel,
    .tanh_we(ld_idle && ld_sel == MEM_TANH2), .tanh_addr(ld_addr[6:0]),
    .tgt_we(ld_idle && ld_sel == MEM_TGT2),   .tgt_addr(ld_addr[3:0]),
    .tbl_wdata(ld_wdata[7:0]),
    .o(o2_s), .t(t2_s), .e_sq(e2_sq), .e_valid(e2_v), .e_half(e2_h)
  );

  stage4_deriv #(.MAX_ITER(MAX_ITER)) u_s4 (
    .clk, .rst_n, .start(start_ok), .e1_sq, .e2_sq, .e_valid(e1_v), .e_half(e1_h),
    .err_goal, .e_sum, .eh_sum, .der, .der_valid, .iter, .stop, .converged, .done
  );

  // neuron sums and outputs of the unperturbed pass, for observation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= '0; y2 <= '0; o1 <= '0; o2 <= '0;
    end else begin
      if (y1_v && !y1_h) begin y1 <= y1_s; y2 <= y2_s; end
      if (e1_v && !e1_h) begin o1 <= o1_s; o2 <= o2_s; end
    end
  end

  a_neurons_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (y1_v == y2_v) && (e1_v == e2_v) && (!e1_v || e1_h == e2_h))
    else $error("the two neuron pipelines fell out of step");

endmodule
