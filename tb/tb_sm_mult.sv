// Exhaustive test of sm_mult: every pair of S DDD.FFFF operands is multiplied
// and compared, as a real number, with the product of the operands' values;
// the Table 1 encodings (5.3 -> 8'h55, -7.9375 -> 8'hFF, ...) are checked
// as spot cases.
module tb_sm_mult;
  import nn_pkg::*;

  int checks = 0, failures = 0;
  sm8_t  a, b;
  prod_t p;

  sm_mult dut (.a, .b, .p);

  function automatic real val8(logic [7:0] v);
    real m;
    m = real'(v[6:0]) / 16.0;
    return v[7] ? -m : m;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        real expv, got;
        a = sm8_t'(8'(i)); b = sm8_t'(8'(j));
        #1;
        expv = val8(8'(i)) * val8(8'(j));
        got  = real'(p.mag) / 256.0;
        if (p.s) got = -got;
        checks++;
        if (got != expv && !(p.mag == 0 && expv == 0.0)) begin
          failures++;
          if (failures < 10) $display("FAIL: %h * %h = %f, expected %f", i, j, got, expv);
        end
      end
    end
    // Table 1 operands: 5.3 * 3.25 and -7.9375 * 0.125
    a = sm8_t'(8'h55); b = sm8_t'(8'h34); #1;
    checks++; if (p.s != 1'b0 || p.mag != 14'(85 * 52)) failures++;
    a = sm8_t'(8'hFF); b = sm8_t'(8'h02); #1;
    checks++; if (p.s != 1'b1 || p.mag != 14'(127 * 2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
