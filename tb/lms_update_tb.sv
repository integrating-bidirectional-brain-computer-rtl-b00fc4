// Self-checking testbench of lms_update: exhaustive over the ADC code for a
// set of stored values and every step shift, against
// y + round(e / 2^mu) (halves rounded up) saturated to +/-511.
module lms_update_tb;
  logic signed [9:0] y_old, y_new;
  logic [7:0] adc_code;
  logic [3:0] mu_shift;
  logic saturated;
  int checks = 0, failures = 0, sats = 0;
  lms_update dut (.*);

  function automatic int floordiv(int a, int s);
    int d = 1 << s;
    begin
      int b; b = a + ((s == 0) ? 0 : d / 2);
      return (b >= 0) ? b / d : -((-b + d - 1) / d);
    end
  endfunction

  initial begin
    int ys[10] = '{0, 1, -1, 100, -100, 511, -511, 505, -508, 250};
    for (int yi = 0; yi < 10; yi++)
      for (int m = 0; m < 16; m++)
        for (int a = 0; a < 256; a++) begin
          int e, exp_v; bit exp_s;
          y_old = 10'(ys[yi]); mu_shift = 4'(m); adc_code = 8'(a);
          #1;
          e = a - 128;
          exp_v = ys[yi] + floordiv(e, m);
          exp_s = 0;
          if (exp_v > 511) begin exp_v = 511; exp_s = 1; end
          if (exp_v < -511) begin exp_v = -511; exp_s = 1; end
          sats += exp_s;
          checks++;
          if (int'(y_new) != exp_v || saturated != exp_s) begin
            failures++;
            if (failures < 10) $display("y=%0d e=%0d mu=%0d: got %0d/%0d want %0d/%0d", ys[yi], e, m, y_new, saturated, exp_v, exp_s);
          end
        end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
