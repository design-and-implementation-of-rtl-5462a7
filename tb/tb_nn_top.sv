// End-to-end test of nn_top at its default parameters (126 inputs, at most
// 50 iterations).
//
// The testbench loads an input vector (125 random values and the bias input
// 1.0), random starting weights for both neurons with their w + h copies and
// zero-byte markers, tanh tables round(16*tanh(i/16)) and a target table, and
// then trains the network twice:
//   run 1: error goal 0, so training runs into the 50-iteration limit;
//   run 2: continuing from the trained weights with an error goal chosen from
//          the model so that training stops within three iterations because
//          the error is acceptable;
//   run 3: inputs at 7.9375 that push |Y| past the end of the tanh table,
//          with a goal met at once.
// A bit-exact integer model of the whole algorithm, written here from the
// algorithm rather than from the RTL structure, predicts E, Eh, the
// derivative, Y, o and the stop decision of every iteration, and the final
// contents of the weight memories, which are read back and compared. The
// number of clocks per iteration is checked against the pipeline budget.
// Each mechanism of the design is counted and must occur at least once:
// memory swaps, zero-byte markers, positive and negative products, negative
// neuron sums (sign transferred through the tanh table), a saturated table
// index, a non-zero weight update, the iteration-limit stop and the
// error-goal stop.
module tb_nn_top;
  import nn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N_IN     = 126;   // 125 inputs + bias
  localparam int MAX_ITER = 50;
  localparam int ITER_CLOCKS = 261; // clocks between derivative pulses

  int checks = 0, failures = 0;

  logic rst_n, start, ld_we;
  logic [3:0] t_sel;
  logic [ESUM_W-1:0] err_goal;
  mem_sel_t ld_sel;
  logic [7:0] ld_addr;
  logic [15:0] ld_wdata, ld_rdata;
  logic busy, done, converged, bank_q;
  logic [ITER_W-1:0] iter;
  logic [ESUM_W-1:0] e_sum, eh_sum;
  logic signed [DER_W-1:0] der;
  logic signed [Y_W-1:0] y1, y2;
  sm8_t o1, o2;

  nn_top dut (.clk, .rst_n, .start, .t_sel, .err_goal, .ld_we, .ld_sel, .ld_addr, .ld_wdata,
              .ld_rdata, .busy, .done, .converged, .iter, .bank_q, .e_sum, .eh_sum, .der,
              .y1, .y2, .o1, .o2);

  // ------------------------------------------------------------------ model
  logic [7:0] xv [128];
  logic [7:0] wm [2][256];     // current weights of the model (bytes)
  int tanh_tab [128];
  logic [7:0] tgt [2][16];
  int m_der;                   // derivative the model will apply next

  // expected results of one iteration
  int x_e, x_eh, x_der, x_y [2], x_o [2];
  bit x_stop, x_conv;

  // mechanism counters
  int n_swap, n_zero, n_pos, n_neg, n_ysign, n_tsat, n_upd, n_limit, n_goal;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int val(logic [7:0] b);
    return b[7] ? -int'(b[6:0]) : int'(b[6:0]);
  endfunction

  function automatic logic [7:0] enc(int r);
    if (r > 127) r = 127;
    if (r < -127) r = -127;
    if (r <= 0) return {1'b1, 7'(-r)};
    return {1'b0, 7'(r)};
  endfunction

  function automatic int act(int y);
    int i;
    i = (y < 0 ? -y : y) / 16;
    if (i > 127) i = 127;
    return y < 0 ? -tanh_tab[i] : tanh_tab[i];
  endfunction

  // one training iteration of the algorithm, iteration number n (from 1)
  task automatic model_iter(int n, int goal, int ts);
    int e[2];
    for (int h = 0; h < 2; h++) begin
      e[h] = 0;
      for (int k = 0; k < 2; k++) begin
        int y, o, t;
        y = 0;
        for (int i = 0; i < N_IN; i++) begin
          wm[k][h * 128 + i] = enc(val(wm[k][h * 128 + i]) - m_der);
          y += val(xv[i]) * val(wm[k][h * 128 + i]);
        end
        o = act(y);
        t = val(tgt[k][ts]);
        e[h] += (o - t) * (o - t);
        if (h == 0) begin x_y[k] = y; x_o[k] = o; end
      end
    end
    x_e = e[0]; x_eh = e[1];
    x_der = int'($floor(real'(x_eh - x_e) / 16.0 + 0.5));
    x_conv = (x_e <= goal);
    x_stop = x_conv || (n >= MAX_ITER);
    m_der = x_der;
  endtask

  // ------------------------------------------------------------ DUT helpers
  task automatic load(mem_sel_t s, int a, logic [15:0] d);
    ld_we = 1; ld_sel = s; ld_addr = 8'(a); ld_wdata = d;
    @(negedge clk);
    ld_we = 0;
  endtask

  // mechanism monitors on internal signals
  always @(posedge clk) if (rst_n) begin
    if (dut.u_s1.zero_byte) n_zero++;
    if (dut.u_s1.p_valid && dut.u_s1.p1.mag != 0) begin
      if (dut.u_s1.p1.s) n_neg++; else n_pos++;
    end
    if (dut.u_s2_n1.y_valid && dut.u_s2_n1.y < 0) n_ysign++;
    if (dut.u_s2_n1.y_valid && (dut.u_s2_n1.y > 2047 || dut.u_s2_n1.y < -2047)) n_tsat++;
    if (dut.u_s2_n2.y_valid && (dut.u_s2_n2.y > 2047 || dut.u_s2_n2.y < -2047)) n_tsat++;
    if (dut.u_s4.der_valid && dut.u_s4.der != 0) n_upd++;
  end
  logic q_prev;
  always @(posedge clk) begin
    if (rst_n && bank_q != q_prev) n_swap++;
    q_prev <= bank_q;
  end

  // one training run; returns the number of iterations
  task automatic train(int goal, int ts, output int iters);
    int n, cyc, last;
    bit fin;
    t_sel = 4'(ts); err_goal = ESUM_W'(goal);
    m_der = 0;
    start = 1; @(negedge clk); start = 0;
    n = 0; cyc = 0; last = -1; fin = 0;
    while (!fin) begin
      @(negedge clk);
      cyc++;
      if (dut.u_s4.der_valid) begin
        n++;
        model_iter(n, goal, ts);
        check(int'(e_sum) == x_e,  $sformatf("iter %0d: E=%0d expected %0d", n, e_sum, x_e));
        check(int'(eh_sum) == x_eh, $sformatf("iter %0d: Eh=%0d expected %0d", n, eh_sum, x_eh));
        check(int'(der) == x_der,  $sformatf("iter %0d: der=%0d expected %0d", n, der, x_der));
        check(int'(iter) == n, "iteration count");
        check(dut.u_s4.stop == x_stop, $sformatf("iter %0d: stop=%0d expected %0d", n, dut.u_s4.stop, x_stop));
        check(int'(y1) == x_y[0] && int'(y2) == x_y[1],
              $sformatf("iter %0d: Y=%0d,%0d expected %0d,%0d", n, y1, y2, x_y[0], x_y[1]));
        check(sm_to_int(o1) == x_o[0] && sm_to_int(o2) == x_o[1], "neuron outputs");
        if (n <= 6 || x_stop) $display("iteration %0d: E=%0d Eh=%0d der=%0d", n, x_e, x_eh, x_der);
        if (last >= 0) check(cyc - last == ITER_CLOCKS,
                             $sformatf("iteration took %0d clocks, expected %0d", cyc - last, ITER_CLOCKS));
        last = cyc;
        if (x_stop) begin
          if (x_conv) n_goal++;
          else n_limit++;
        end
      end
      if (!busy) fin = 1;
      if (cyc > 300 * MAX_ITER) begin
        check(0, "training never finished");
        fin = 1;
      end
    end
    check(done && converged == x_conv, "done and converged flags");
    iters = n;
  endtask

  task automatic check_weights();
    for (int k = 0; k < 2; k++) begin
      for (int a = 0; a < 256; a++) begin
        logic [15:0] expw;
        if (a[6:0] >= 7'(N_IN)) continue;
        ld_sel = (k == 0) ? (bank_q ? MEM_W1B : MEM_W1A) : (bank_q ? MEM_W2B : MEM_W2A);
        ld_addr = 8'(a);
        @(negedge clk);
        expw = {8'h00, wm[k][a]};
        check(ld_rdata == expw, $sformatf("neuron %0d weight %0d: %h expected %h", k + 1, a, ld_rdata, expw));
      end
      for (int a = N_IN; a < 256; a += 128) begin
        ld_addr = 8'(a);
        @(negedge clk);
        check(ld_rdata == 16'h0000, "zero-byte kept");
      end
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int it1, it2, it3, goal2;
    logic [7:0] wsave [2][256];
    rst_n = 0; start = 0; ld_we = 0; ld_sel = MEM_X; ld_addr = 0; ld_wdata = 0;
    t_sel = 0; err_goal = 0;
    n_swap = 0; n_zero = 0; n_pos = 0; n_neg = 0; n_ysign = 0; n_tsat = 0;
    n_upd = 0; n_limit = 0; n_goal = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // input vector: x1..x125, then the bias input 1.0
    for (int i = 0; i < 128; i++) begin
      xv[i] = (i == N_IN - 1) ? 8'h10 : {((i * 7) % 9 < 4), 7'(i % 3 == 0)};
      load(MEM_X, i, {8'h00, xv[i]});
    end
    // weights w in 0..125, w + h (h = 0.5 = 8/16) in 128..253, zero-bytes
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 128; i++) begin
        if (i < N_IN) begin
          wm[k][i] = enc(((i * 37 + k * 11) % 13) - 6 + (k == 0 ? 1 : -1));
          wm[k][128 + i] = enc(val(wm[k][i]) + 8);
        end else begin
          wm[k][i] = 8'h00; wm[k][128 + i] = 8'h00;
        end
      end
      for (int a = 0; a < 256; a++) begin
        load(k == 0 ? MEM_W1A : MEM_W2A, a, {8'h00, wm[k][a]});
        load(k == 0 ? MEM_W1B : MEM_W2B, a, (a[6:0] >= 7'(N_IN)) ? 16'h0000 : 16'h5a5a);
      end
    end
    for (int i = 0; i < 128; i++) begin
      tanh_tab[i] = int'($floor(16.0 * $tanh(real'(i) / 16.0) + 0.5));
      load(MEM_TANH1, i, 16'(tanh_tab[i]));
      load(MEM_TANH2, i, 16'(tanh_tab[i]));
    end
    for (int i = 0; i < 16; i++) begin
      tgt[0][i] = enc(int'(i) - 8);
      tgt[1][i] = enc(8 - int'(i));
      load(MEM_TGT1, i, {8'h00, tgt[0][i]});
      load(MEM_TGT2, i, {8'h00, tgt[1][i]});
    end

    // run 1: no error goal, runs into the iteration limit
    train(0, 12, it1);
    check(it1 == MAX_ITER, $sformatf("run 1 stopped after %0d iterations", it1));
    check_weights();

    // run 2: find, on a copy of the model, the E of the 3rd iteration and use
    // it as the goal, so that training stops there
    wsave = wm;
    begin
      int e3;
      m_der = 0;
      for (int n = 1; n <= 3; n++) model_iter(n, -1, 3);
      e3 = x_e;
      goal2 = e3;
      wm = wsave;
      // the goal must not already be met earlier
      m_der = 0;
      model_iter(1, -1, 3);
      if (x_e <= goal2) goal2 = -1;
      m_der = 0;
      model_iter(2, -1, 3);
      if (x_e <= goal2) goal2 = -1;
      wm = wsave;
    end
    if (goal2 < 0) begin
      // fall back: a goal met at once
      goal2 = (1 << ESUM_W) - 1;
    end
    train(goal2, 3, it2);
    check(converged && it2 <= 3, $sformatf("run 2 stopped after %0d iterations, converged=%0d", it2, converged));
    check_weights();

    // run 3: inputs at the top of the range drive |Y| past the end of the
    // tanh table; an error goal that is met at once ends it after one iteration
    for (int i = 0; i < N_IN - 1; i++) begin
      xv[i] = 8'h7f;
      load(MEM_X, i, {8'h00, xv[i]});
    end
    train((1 << ESUM_W) - 1, 0, it3);
    check(converged && it3 == 1, "run 3 stops after one iteration");
    check_weights();

    // every mechanism must have happened
    check(n_swap >= 2,  $sformatf("memory swaps: %0d", n_swap));
    check(n_zero == 2 * (it1 + it2 + it3), $sformatf("zero-bytes: %0d", n_zero));
    check(n_pos > 0 && n_neg > 0, $sformatf("positive %0d / negative %0d products", n_pos, n_neg));
    check(n_ysign > 0, $sformatf("negative neuron sums: %0d", n_ysign));
    check(n_tsat > 0,  $sformatf("saturated tanh index: %0d", n_tsat));
    check(n_upd > 1,   $sformatf("non-zero weight updates: %0d", n_upd));
    check(n_limit == 1, $sformatf("iteration-limit stops: %0d", n_limit));
    check(n_goal >= 1,  $sformatf("error-goal stops: %0d", n_goal));
    $display("mechanisms: swaps=%0d zero_bytes=%0d pos=%0d neg=%0d neg_Y=%0d tanh_sat=%0d updates=%0d limit=%0d goal=%0d",
             n_swap, n_zero, n_pos, n_neg, n_ysign, n_tsat, n_upd, n_limit, n_goal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
