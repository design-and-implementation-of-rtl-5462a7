// Test of stage2_accum: random streams of signed products (126 live words,
// then the zero-byte, with idle clocks mixed in) must give Y = sum of the
// positive magnitudes minus sum of the negative ones, one clock after the
// zero-byte, with the accumulators cleared for the next vector.
module tb_stage2_accum;
  import nn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst_n, clr, p_valid, zero_byte, half_in;
  prod_t p;
  logic signed [Y_W-1:0] y;
  logic y_valid, y_half;

  stage2_accum dut (.clk, .rst_n, .clr, .p, .p_valid, .zero_byte, .half_in,
                    .y, .y_valid, .y_half);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clr = 0; p_valid = 0; zero_byte = 0; half_in = 0; p = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 12; v++) begin
      longint expv;
      expv = 0;
      for (int i = 0; i < 126; i++) begin
        @(negedge clk);
        if (v == 3) begin                       // extreme: all maximal, one sign
          p.s = 1'b1; p.mag = 14'(127 * 127);
        end else if (v == 4) begin
          p.s = 1'b0; p.mag = 14'(127 * 127);
        end else begin
          p.s = 1'($urandom); p.mag = 14'($urandom_range(0, 127 * 127));
        end
        p_valid = 1;
        expv += p.s ? -longint'(p.mag) : longint'(p.mag);
        if ($urandom_range(3) == 0) begin       // an idle clock in between
          @(negedge clk);
          p_valid = 0;
          p = '{s: 1'b0, mag: 14'h3fff};        // must be ignored
        end
      end
      @(negedge clk);
      p_valid = 0; zero_byte = 1; half_in = 1'(v);
      @(negedge clk);
      zero_byte = 0;
      check(y_valid, "y_valid after the zero-byte");
      check(longint'(y) == expv, $sformatf("vector %0d: Y=%0d expected %0d", v, y, expv));
      check(y_half == 1'(v), "half tag");
      @(negedge clk);
      check(!y_valid, "y_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
