// Test of stage1 on its own, the derivative and stop being driven by the
// testbench. Memory A of each neuron is loaded with random weights (126
// live words, the zero-byte at 126 and a non-zero word at 127 that must be
// ignored, and the same for the w + h half); memory B holds only its markers
// and junk. Iteration 1 runs with der = 0, iteration 2 with a random
// derivative after the J-K toggle. Every product must equal x * (w - der)
// computed by the testbench, the zero-byte must close each half after
// exactly 126 products, and after the run memory A must hold w - der (clipped,
// zero as 8'h80) with its marker and spare words untouched.
module tb_stage1;
  import nn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst_n, start, der_valid, stop, ld_we;
  logic signed [DER_W-1:0] der;
  mem_sel_t ld_sel;
  logic [7:0] ld_addr;
  logic [15:0] ld_wdata, ld_rdata;
  logic busy, bank_q, p_valid, zero_byte, half;
  prod_t p1, p2;

  stage1 dut (.clk, .rst_n, .start, .der, .der_valid, .stop, .ld_we, .ld_sel, .ld_addr,
              .ld_wdata, .ld_rdata, .busy, .bank_q, .p1, .p2, .p_valid, .zero_byte, .half);

  logic [7:0]  xv [128];
  logic [15:0] wa [2][256];    // expected contents of memory A, per neuron
  logic [15:0] wb [2][256];    // expected contents of memory B
  int total_products, total_markers;

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

  function automatic logic [7:0] upd(logic [7:0] w, int d);
    int r;
    r = val(w) - d;
    if (r > 127) r = 127;
    if (r < -127) r = -127;
    if (r <= 0) return {1'b1, 7'(-r)};
    return {1'b0, 7'(r)};
  endfunction

  function automatic logic [7:0] rnd_w();
    logic [7:0] b;
    b = 8'($urandom);
    if (b == 8'h00) b = 8'h80;
    return b;
  endfunction

  task automatic load(mem_sel_t s, int a, logic [15:0] d);
    ld_we = 1; ld_sel = s; ld_addr = 8'(a); ld_wdata = d;
    @(negedge clk);
    ld_we = 0;
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one iteration: checks the product stream, returns when the last
  // zero-byte has gone through
  task automatic run_iteration(int d, bit rd_b);
    int k, h, cycles;
    k = 0; h = 0; cycles = 0;
    while (h < 2) begin
      @(negedge clk);
      cycles++;
      if (p_valid) begin
        for (int n = 0; n < 2; n++) begin
          logic [15:0] src;
          logic [7:0]  nw;
          int a, expv, got;
          prod_t p;
          a   = h * 128 + k;
          src = rd_b ? wb[n][a] : wa[n][a];
          nw  = upd(src[7:0], d);
          expv = val(xv[k]) * val(nw);
          p = (n == 0) ? p1 : p2;
          got = p.s ? -int'(p.mag) : int'(p.mag);
          check(got == expv, $sformatf("neuron %0d addr %0d: product %0d expected %0d", n + 1, a, got, expv));
          if (rd_b) wa[n][a] = {8'h00, nw};
          else      wb[n][a] = {8'h00, nw};
        end
        check(half == 1'(h), "half tag of a product");
        k++;
        total_products++;
      end
      if (zero_byte) begin
        check(k == 126, $sformatf("zero-byte after %0d products", k));
        check(half == 1'(h), "half tag of the zero-byte");
        k = 0; h++;
        total_markers++;
      end
      check(cycles < 400, "iteration too long");
      if (cycles >= 400) break;
    end
  endtask

  initial begin
    int d2;
    rst_n = 0; start = 0; der = '0; der_valid = 0; stop = 0;
    ld_we = 0; ld_sel = MEM_X; ld_addr = 0; ld_wdata = 0;
    total_products = 0; total_markers = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) begin
      xv[a] = (a == 125) ? 8'h10 : 8'($urandom);
      load(MEM_X, a, {8'h00, xv[a]});
    end
    for (int n = 0; n < 2; n++) begin
      for (int a = 0; a < 256; a++) begin
        if (a[6:0] == 126) begin
          wa[n][a] = '0; wb[n][a] = '0;
        end else begin
          wa[n][a] = {8'h00, rnd_w()};
          wb[n][a] = 16'($urandom) | 16'h0100;      // junk, never zero
        end
        load(n == 0 ? MEM_W1A : MEM_W2A, a, wa[n][a]);
        load(n == 0 ? MEM_W1B : MEM_W2B, a, wb[n][a]);
      end
    end
    // iteration 1: read A, write B, der = 0
    start = 1; @(negedge clk); start = 0;
    check(busy && !bank_q, "busy, memory A read");
    run_iteration(0, 1'b0);
    repeat (3) @(negedge clk);
    check(busy && !p_valid, "waiting for the derivative");
    d2 = $urandom_range(0, 60) - 30;
    der = DER_W'(d2); der_valid = 1; stop = 0;
    @(negedge clk);
    der_valid = 0;
    check(bank_q, "memories swapped");
    // iteration 2: read B, write A
    run_iteration(d2, 1'b1);
    repeat (3) @(negedge clk);
    der_valid = 1; stop = 1;
    @(negedge clk);
    der_valid = 0; stop = 0;
    @(negedge clk);
    check(!busy, "idle after stop");
    // read memory A back (markers and the spare word 127/255 untouched)
    for (int n = 0; n < 2; n++) begin
      for (int a = 0; a < 256; a++) begin
        ld_sel = (n == 0) ? MEM_W1A : MEM_W2A; ld_addr = 8'(a);
        @(negedge clk);
        check(ld_rdata == wa[n][a], $sformatf("memory A neuron %0d addr %0d: %h expected %h",
                                              n + 1, a, ld_rdata, wa[n][a]));
      end
    end
    check(total_products == 4 * 126 && total_markers == 4, "products and zero-bytes counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
