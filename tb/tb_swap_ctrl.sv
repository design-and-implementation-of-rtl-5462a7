// Test of swap_ctrl: after start the address must run 0..255 on 256
// consecutive clocks; the sequencer must then wait, toggle q on the
// derivative pulse and restart at address 0, and go idle when the pulse comes
// with stop. A start while busy must be ignored.
module tb_swap_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst_n, start, der_valid, stop;
  logic       busy, waiting, q, issue;
  logic [7:0] addr;

  swap_ctrl #(.AW(8)) dut (.clk, .rst_n, .start, .der_valid, .stop,
                           .busy, .waiting, .q, .issue, .addr);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_pass(int expect_q);
    int n;
    n = 0;
    while (issue) begin
      check(addr == 8'(n), $sformatf("address %0d, expected %0d", addr, n));
      check(q == expect_q[0], "bank select during the pass");
      if (n == 5) start = 1;           // ignored while busy
      else start = 0;
      n++;
      @(negedge clk);
    end
    check(n == 256, $sformatf("pass lasted %0d clocks", n));
    check(waiting && busy, "waiting after the pass");
  endtask

  initial begin
    rst_n = 0; start = 0; der_valid = 0; stop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !q, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    one_pass(0);
    repeat (7) begin
      @(negedge clk);
      check(waiting && !issue, "still waiting");
    end
    der_valid = 1; stop = 0;
    @(negedge clk);
    der_valid = 0;
    check(q == 1'b1, "q toggled");
    check(issue && addr == 0, "second iteration restarted");
    one_pass(1);
    @(negedge clk);
    der_valid = 1; stop = 1;
    @(negedge clk);
    der_valid = 0; stop = 0;
    check(q == 1'b0, "q toggled back");
    check(!busy && !issue, "idle after stop");
    repeat (5) @(negedge clk);
    check(!busy, "stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
