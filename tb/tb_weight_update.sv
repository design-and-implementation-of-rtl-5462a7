// Test of weight_update: every weight against a spread of derivatives
// (including values far past the range), compared with w - der computed in
// integers and clipped to +/-127 sixteenths; a zero result must come out as
// minus zero (8'h80), never as the all-zero marker byte.
module tb_weight_update;
  import nn_pkg::*;

  int checks = 0, failures = 0;
  int sat_hits = 0, zero_hits = 0;
  sm8_t w, w_new;
  logic signed [DER_W-1:0] der;

  weight_update dut (.w, .der, .w_new);

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 60; k++) begin
        int wi, d, e, got;
        w = sm8_t'(8'(i));
        if (k < 40) d = $urandom_range(0, 80) - 40;
        else if (k < 50) d = $urandom_range(0, 16000) - 8000;
        else d = (i[6:0] == 0) ? 0 : (i[7] ? -int'(i[6:0]) : int'(i[6:0]));
        der = DER_W'(d);
        #1;
        wi = i[7] ? -int'(i[6:0]) : int'(i[6:0]);
        e = wi - d;
        if (e > 127) begin e = 127; sat_hits++; end
        if (e < -127) begin e = -127; sat_hits++; end
        got = w_new.s ? -int'(w_new.mag) : int'(w_new.mag);
        checks++;
        if (got != e || (e == 0 && w_new != sm8_t'(8'h80))) begin
          failures++;
          if (failures < 10) $display("FAIL: w=%h der=%0d -> %h, expected %0d", i, d, w_new, e);
        end
        if (e == 0) zero_hits++;
      end
    end
    checks++;
    if (sat_hits == 0 || zero_hits == 0) begin
      failures++;
      $display("FAIL: saturation (%0d) or zero (%0d) cases never exercised", sat_hits, zero_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
