// Test of stage4_deriv: pairs of squared errors for the w pass and the w + h
// pass must give der = round((Eh - E)/16) with a pulse, count iterations,
// and raise stop/done on the iteration limit (here reduced to 5) or as soon as
// E is at or below the error goal.
module tb_stage4_deriv;
  import nn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst_n, start, e_valid, e_half;
  logic [SQ_W-1:0] e1_sq, e2_sq;
  logic [ESUM_W-1:0] err_goal, e_sum, eh_sum;
  logic signed [DER_W-1:0] der;
  logic der_valid, stop, converged, done;
  logic [ITER_W-1:0] iter;

  stage4_deriv #(.MAX_ITER(5)) dut (.clk, .rst_n, .start, .e1_sq, .e2_sq, .e_valid, .e_half,
    .err_goal, .e_sum, .eh_sum, .der, .der_valid, .iter, .stop, .converged, .done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic iteration(int a1, int a2, int b1, int b2, int n, bit exp_stop, bit exp_conv);
    int ev, ehv, dv;
    e1_sq = SQ_W'(a1); e2_sq = SQ_W'(a2); e_valid = 1; e_half = 0;
    @(negedge clk);
    e_valid = 0;
    repeat (3) @(negedge clk);
    check(!der_valid, "no derivative after the first half");
    e1_sq = SQ_W'(b1); e2_sq = SQ_W'(b2); e_valid = 1; e_half = 1;
    @(negedge clk);
    e_valid = 0;
    ev = a1 + a2; ehv = b1 + b2;
    dv = int'($floor(real'(ehv - ev) / 16.0 + 0.5));
    check(der_valid, "derivative pulse");
    check(int'(e_sum) == ev && int'(eh_sum) == ehv, "E and Eh");
    check(int'(der) == dv, $sformatf("der=%0d expected %0d (Eh-E=%0d)", der, dv, ehv - ev));
    check(int'(iter) == n, $sformatf("iteration %0d expected %0d", iter, n));
    check(stop == exp_stop && done == exp_stop, $sformatf("stop=%0d expected %0d", stop, exp_stop));
    check(converged == exp_conv, "converged flag");
    @(negedge clk);
    check(!der_valid, "der_valid is a pulse");
  endtask

  initial begin
    rst_n = 0; start = 0; e_valid = 0; e_half = 0; e1_sq = 0; e2_sq = 0; err_goal = 10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    // run into the iteration limit
    for (int n = 1; n <= 5; n++)
      iteration($urandom_range(100, 60000), $urandom_range(100, 60000),
                $urandom_range(0, 65000), $urandom_range(0, 65000), n, n == 5, 1'b0);
    // restart; converge on the third iteration
    start = 1; @(negedge clk); start = 0;
    check(iter == 0 && !done && der == 0, "start clears");
    iteration(900, 700, 1000, 800, 1, 1'b0, 1'b0);
    iteration(500, 300, 200, 100, 2, 1'b0, 1'b0);
    iteration(4, 6, 50, 1, 3, 1'b1, 1'b1);
    // exact rounding corner cases: Eh-E = +8 and -8 and -9
    start = 1; err_goal = 0; @(negedge clk); start = 0;
    iteration(100, 100, 104, 104, 1, 1'b0, 1'b0);
    iteration(100, 100, 96, 96, 2, 1'b0, 1'b0);
    iteration(100, 100, 95, 96, 3, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
