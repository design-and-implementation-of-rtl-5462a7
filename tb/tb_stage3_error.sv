// Test of stage3_error: the tanh table is filled with round(16*tanh(i/16))
// and the target table with random targets; for random neuron sums Y
// (including negative ones and ones far beyond the table) the stage must
// return o = sign(Y)*table(|Y|) and (o - t)^2, two clocks after y_valid.
module tb_stage3_error;
  import nn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst_n, y_valid, y_half, tanh_we, tgt_we;
  logic signed [Y_W-1:0] y;
  logic [3:0] t_sel, tgt_addr;
  logic [6:0] tanh_addr;
  logic [7:0] tbl_wdata;
  sm8_t o, t;
  logic [SQ_W-1:0] e_sq;
  logic e_valid, e_half;

  int tanh_tab [128];
  int tgt_tab [16];

  stage3_error dut (.clk, .rst_n, .y, .y_valid, .y_half, .t_sel, .tanh_we, .tanh_addr,
                    .tgt_we, .tgt_addr, .tbl_wdata, .o, .t, .e_sq, .e_valid, .e_half);

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

  initial begin
    int neg_seen;
    neg_seen = 0;
    rst_n = 0; y_valid = 0; y_half = 0; tanh_we = 0; tgt_we = 0; y = '0;
    t_sel = 0; tgt_addr = 0; tanh_addr = 0; tbl_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      tanh_tab[i] = int'($floor(16.0 * $tanh(real'(i) / 16.0) + 0.5));
      tanh_we = 1; tanh_addr = 7'(i); tbl_wdata = 8'(tanh_tab[i]);
      @(negedge clk);
    end
    tanh_we = 0;
    for (int i = 0; i < 16; i++) begin
      tgt_tab[i] = $urandom_range(0, 255);
      tgt_we = 1; tgt_addr = 4'(i); tbl_wdata = 8'(tgt_tab[i]);
      @(negedge clk);
    end
    tgt_we = 0;
    for (int k = 0; k < 400; k++) begin
      int yv, idx, ov, tv, ev;
      if (k % 3 == 0) yv = $urandom_range(0, 60000) - 30000;   // beyond the table
      else            yv = $urandom_range(0, 4000) - 2000;
      t_sel = 4'($urandom);
      y = Y_W'(yv); y_valid = 1; y_half = 1'(k);
      @(negedge clk);
      y_valid = 0;
      @(negedge clk);
      check(e_valid, "e_valid two clocks after y_valid");
      idx = (yv < 0 ? -yv : yv) / 16;
      if (idx > 127) idx = 127;
      ov = (yv < 0) ? -tanh_tab[idx] : tanh_tab[idx];
      tv = tgt_tab[t_sel][7] ? -int'(tgt_tab[t_sel][6:0]) : int'(tgt_tab[t_sel][6:0]);
      ev = (ov - tv) * (ov - tv);
      check(sm_to_int(o) == ov, $sformatf("Y=%0d: o=%0d expected %0d", yv, sm_to_int(o), ov));
      check(int'(e_sq) == ev, $sformatf("Y=%0d t=%0d: e^2=%0d expected %0d", yv, tv, e_sq, ev));
      check(e_half == 1'(k), "half tag");
      if (yv < -16) neg_seen++;
    end
    check(neg_seen > 0, "negative sums exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
