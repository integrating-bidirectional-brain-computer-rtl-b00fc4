// Self-checking testbench of artifact_canceller (default sizes: 64
// channels, 4 sense channels, 32 taps of 10 bits).
// The testbench plays the recording chain: it scans 8 channels per frame
// (16 cycles per slot), fires a stimulus pulse on a frame boundary every
// 40 frames, and models the analog path of a sense channel as
// adc = clip(128 + artifact - 64 * cdac_code). Each sense channel has its
// own artifact shape. Checked every slot against a reference of the
// update rule: the CDAC word (zero on other channels, outside the 32-frame
// window, or with cancel_en low), and the template after each update.
// Also checked: convergence within 60 pulses (residual within one CDAC step
// on every tap of every pair, the chip converged within 120 pulses), the clear sequence (all words zero, 128 cycles), adaptation
// off (template frozen), and that updates and saturation both occurred.
module artifact_canceller_tb;
  localparam int NCH = 8, SLOT = 16, NT = 32, S = 4, PER = 40;
  logic clk = 0, rst_n = 0, slot_start = 0, frame_end = 0, adc_valid = 0;
  logic [5:0] ch = 0;
  logic [7:0] adc_code = 128;
  logic trigger = 0, cancel_en = 1, adapt_en = 1, clear = 0;
  logic [3:0] mu_shift = 6;
  logic [5:0] sense_ch [S];
  logic signed [9:0] cdac_code;
  logic window, clearing, upd_event, sat_event;
  logic [4:0] tap;
  int checks = 0, failures = 0, updates = 0, sats = 0;
  int refm [S][NT];
  int art [S][NT];
  int frames_since = 1000;   // frames since the last pulse
  int max_res [S];

  artifact_canceller dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin updates += upd_event; sats += sat_event; end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic int fdiv(int a, int s);
    int d; d = 1 << s;
    begin
      int b; b = a + ((s == 0) ? 0 : d / 2);
      return (b >= 0) ? b / d : -((-b + d - 1) / d);
    end
  endfunction

  // one frame; pulse = fire a stimulus at the end of this frame
  task automatic frame(bit pulse);
    for (int c = 0; c < NCH; c++) begin
      int j; int a; int exp_c;
      j = -1;
      for (int k = S - 1; k >= 0; k--) if (sense_ch[k] == 6'(c)) j = k;
      @(negedge clk); slot_start = 1; ch = 6'(c);
      @(negedge clk); slot_start = 0;
      repeat (3) @(negedge clk);
      exp_c = 0;
      if (j >= 0 && frames_since < NT && cancel_en) exp_c = refm[j][frames_since];
      check(int'(cdac_code) == exp_c, $sformatf("cdac %0d exp %0d ch %0d tap %0d", cdac_code, exp_c, c, frames_since));
      a = 128 + ((j >= 0 && frames_since < NT) ? art[j][frames_since] : 0) - 64 * int'(cdac_code);
      if (a < 0) a = 0; if (a > 255) a = 255;
      if (j >= 0 && frames_since < NT && frames_since > 0 && (a - 128 > 64 || a - 128 < -64))
        if (pulse_no > 60) max_res[j]++;
      repeat (5) @(negedge clk);
      adc_valid = 1; adc_code = 8'(a);
      @(negedge clk); adc_valid = 0;
      if (j >= 0 && frames_since < NT && adapt_en) begin
        int v; v = refm[j][frames_since] + fdiv(a - 128, mu_shift);
        if (v > 511) v = 511; if (v < -511) v = -511;
        refm[j][frames_since] = v;
      end
      repeat (SLOT - 11) @(negedge clk);
      if (c == NCH - 1) begin frame_end = 1; trigger = pulse; end
      @(negedge clk); frame_end = 0; trigger = 0;
    end
    if (pulse) frames_since = 0; else frames_since++;
  endtask

  int pulse_no = 0;
  task automatic run_pulses(int n);
    for (int p = 0; p < n; p++) begin
      frame(1); pulse_no++;
      for (int f = 1; f < PER; f++) frame(0);
    end
  endtask

  initial begin
    sense_ch = '{6'd2, 6'd5, 6'd6, 6'd1};
    for (int j = 0; j < S; j++) begin
      max_res[j] = 0;
      for (int n = 0; n < NT; n++) begin
        real t; t = n;
        case (j)   // artifact shapes in ADC steps (64 per CDAC step)
          0: art[j][n] = int'(3000.0 * $exp(-t / 4.0)) - int'(1200.0 * $exp(-t / 9.0));
          1: art[j][n] = int'(2500.0 * $sin(3.14159 * t / 12.0));
          2: art[j][n] = (n < 6) ? 2000 : ((n < 12) ? -2000 : 0);
          default: art[j][n] = -int'(1800.0 * $exp(-t / 6.0));
        endcase
      end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    // clear the random power-up contents
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    begin
      int n; n = 0;
      while (clearing) begin @(negedge clk); n++; end
      check(n == 128, $sformatf("clear took %0d more cycles", n));
    end
    for (int j = 0; j < S; j++) for (int n = 0; n < NT; n++) refm[j][n] = 0;
    run_pulses(80);
    for (int j = 0; j < S; j++) check(max_res[j] == 0, $sformatf("pair %0d not converged: %0d", j, max_res[j]));
    // residual checks on converged template: every stored value within one step
    for (int j = 0; j < S; j++) for (int n = 1; n < NT; n++)
      check(refm[j][n] * 64 - art[j][n] <= 64 && art[j][n] - refm[j][n] * 64 <= 128 || n == 0,
            $sformatf("template %0d/%0d = %0d vs %0d", j, n, refm[j][n], art[j][n]));
    // adaptation off: template frozen
    adapt_en = 0;
    begin
      int u0; u0 = updates; run_pulses(2); check(updates == u0, "updates while adapt_en low");
    end
    adapt_en = 1;
    // cancellation off: CDAC words zero (checked per slot), still adapting
    cancel_en = 0; run_pulses(1); cancel_en = 1;
    // clear and check all-zero output
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (clearing) @(negedge clk);
    for (int j = 0; j < S; j++) for (int n = 0; n < NT; n++) refm[j][n] = 0;
    adapt_en = 0; run_pulses(1); adapt_en = 1;
    // a full-step update (mu = 0) against a huge artifact saturates the word
    art[0][0] = 40000; mu_shift = 0; run_pulses(6); mu_shift = 6;
    check(refm[0][0] == 511, "template saturates at +511");
    check(updates > 1000, $sformatf("updates %0d", updates));
    check(sats > 0, "saturation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (110 * PER * NCH * SLOT) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
