// Workload testbench of bbci_top at its default sizes: the two measured
// operating points that differ from the 2 kS/s bench test of bbci_top_tb.
//
//   A. Spike-band recording at 16 kS/s per channel: the scan is cut to 8
//      channels (8 x 16 cycles = 128-cycle frames at 2.048 MHz) and
//      stimulator 0 fires a square biphasic pulse 77 times a second
//      (every 207 frames, 16000 / 77 = 207.8), an artifact that clips the
//      ADC, sensed on channels 0..3.
//   B. Low-rate stimulation as used in vivo: 64 channels at 2 kS/s,
//      stimulator 2 delivers +/-150 uA biphasic pulses (IDAC code 15 at the
//      nominal 10 uA step) 5 times a second (every 400 frames), sensed on
//      channels 10, 11, 40 and 41.
//
// For each: the interval between pulse launches is checked in clock cycles
// (period x frame length), the ADC must clip while cancellation is off, and
// after adaptation with step 2^-7 the residual at the ADC on every sense
// channel must stay within one CDAC step (64 ADC steps) plus the test tone,
// with no clipping. Case A is given 100 pulses to converge (40 were not
// enough with this artifact, which moves several CDAC steps between two
// samples of a channel); the chip is reported to converge on full-scale
// artifacts within 120 pulses.
// The design is reset between the two.
module bbci_workload_tb;
  import bbci_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rec_en = 0;
  logic [5:0] ch_last = 63;
  logic wl_we = 0; logic [3:0] wl_addr = 0; logic [15:0] wl_data = 0;
  logic [5:0] mux_ch; logic adc_convert, adc_valid; logic [7:0] adc_code;
  logic [9:0] cdac_int_code; logic signed [9:0] cdac_canc_code [4];
  logic cms_cue, out_valid; logic [5:0] out_ch; logic [15:0] out_data;
  logic cancel_en = 0, adapt_en = 0, canc_clear = 0; logic [3:0] mu_shift = 7;
  logic [5:0] sense_ch [4][4];
  logic [3:0] canc_window, canc_clearing;
  logic [3:0] stim_enable = 0, stim_go = 0;
  logic [15:0] stim_period [4]; logic [7:0] stim_step_div [4]; logic [5:0] stim_wave_len [4];
  logic wave_we = 0; logic [1:0] wave_stim = 0; logic [4:0] wave_addr = 0; stim_sample_t wave_data = '0;
  logic [3:0] dropout; hb_ctrl_t hb_ctrl [4]; logic [7:0] idac_code [4]; logic [3:0] stim_active;
  logic [3:0] ev_trigger, ev_update, ev_saturate, ev_break; logic [1:0] ev_int_step; logic ev_frame;

  bbci_top dut (.*);
  bbci_afe_model afe (.clk, .mux_ch, .adc_convert, .cdac_int_code, .cdac_canc_code,
                      .hb_ctrl, .idac_code, .adc_valid, .adc_code, .dropout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ------------------------------------------------- launch intervals
  longint cyc = 0, last_trig = -1, exp_interval = 0;
  int     n_trig = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ev_trigger != 0) begin
      n_trig++;
      if (last_trig >= 0 && exp_interval > 0)
        check(cyc - last_trig == exp_interval,
              $sformatf("pulse interval %0d cycles, expected %0d", cyc - last_trig, exp_interval));
      last_trig = cyc;
    end
  end

  // ------------------------------------------- residual measurement
  int   res_max = 0, clip_cnt = 0, res_over = 0;
  bit   measuring = 0;
  int   sense_list [4];
  logic [5:0] slot_ch;
  always @(posedge clk) if (adc_convert) slot_ch <= mux_ch;
  always @(posedge clk) if (adc_valid && measuring && canc_window != 0 &&
                            int'(slot_ch) inside {sense_list}) begin
    int r; r = int'(adc_code) - 128; if (r < 0) r = -r;
    if (r > res_max) res_max = r;
    if (adc_code == 0 || adc_code == 255) clip_cnt++;
    if (r > 64 + 12) res_over++;
  end

  task automatic frames(int n);
    repeat (n) begin @(posedge clk); while (!ev_frame) @(posedge clk); end
  endtask

  // square biphasic pulse: 12 samples +mag, 4 rest, 12 samples -mag
  task automatic load_square(int s, int mag);
    for (int i = 0; i < 28; i++) begin
      @(negedge clk); wave_we = 1; wave_stim = 2'(s); wave_addr = 5'(i);
      wave_data.neg = (i >= 16);
      wave_data.mag = (i < 12 || i >= 16) ? 8'(mag) : 8'd0;
    end
    @(negedge clk); wave_we = 0;
  endtask

  task automatic run_case(string name, int s, int period, int last_ch, int conv_pulses);
    int frame_cyc;
    frame_cyc = 16 * (last_ch + 1);
    for (int t = 0; t < 4; t++) for (int j = 0; j < 4; j++) sense_ch[t][j] = 6'(63 - j);
    for (int j = 0; j < 4; j++) sense_ch[s][j] = 6'(sense_list[j]);
    stim_period[s] = 16'(period);
    @(negedge clk); canc_clear = 1; @(negedge clk); canc_clear = 0;
    while (canc_clearing != 0) @(negedge clk);
    ch_last = 6'(last_ch); rec_en = 1;
    frames(2);
    exp_interval = longint'(period) * frame_cyc; last_trig = -1;
    @(negedge clk); stim_enable[s] = 1; stim_go[s] = 1; @(negedge clk); stim_go[s] = 0;
    // cancellation off
    res_max = 0; clip_cnt = 0; measuring = 1;
    frames(3 * period);
    measuring = 0;
    $display("%s, no cancellation: peak residual %0d, clipped %0d", name, res_max, clip_cnt);
    check(clip_cnt > 0, {name, ": artifact should clip the ADC without cancellation"});
    // adaptation
    cancel_en = 1; adapt_en = 1; mu_shift = 7;
    frames(conv_pulses * period);
    res_max = 0; clip_cnt = 0; res_over = 0; measuring = 1;
    frames(5 * period);
    measuring = 0;
    $display("%s, converged: peak residual %0d, clipped %0d, over limit %0d", name, res_max, clip_cnt, res_over);
    check(clip_cnt == 0, {name, ": ADC clipping after convergence"});
    check(res_over == 0, {name, ": residual above one CDAC step after convergence"});
    stim_enable[s] = 0; cancel_en = 0; adapt_en = 0; rec_en = 0; exp_interval = 0;
  endtask

  initial begin
    int n0;
    for (int s = 0; s < 4; s++) begin
      stim_period[s] = 16'd0; stim_step_div[s] = 8'd0; stim_wave_len[s] = 6'd0;
      for (int j = 0; j < 4; j++) sense_ch[s][j] = 6'(63 - j);
    end
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- A: 8 channels at 16 kS/s, 77 pulses/s
    sense_list = '{0, 1, 2, 3};
    for (int j = 0; j < 4; j++) afe.set_coupling(0, j, 0.010 + 0.002 * j);
    stim_step_div[0] = 8'd31; stim_wave_len[0] = 6'd28;
    load_square(0, 200);
    n0 = n_trig;
    run_case("16 kS/s, 77 pulses/s", 0, 207, 7, 100);
    check(n_trig - n0 >= 48, "16 kS/s: pulse count");

    // ---- B: 64 channels at 2 kS/s, +/-150 uA at 5 pulses/s
    @(negedge clk); rst_n = 0; repeat (3) @(negedge clk); rst_n = 1;
    sense_list = '{10, 11, 40, 41};
    for (int j = 0; j < 4; j++) afe.set_coupling(2, sense_list[j], 0.006 + 0.002 * j);
    stim_step_div[2] = 8'd127; stim_wave_len[2] = 6'd28;
    load_square(2, 15);
    n0 = n_trig;
    run_case("2 kS/s, +/-150 uA, 5 pulses/s", 2, 400, 63, 20);
    check(n_trig - n0 >= 28, "5 pulses/s: pulse count");

    $display("pulses %0d, ADC clips in the analog model %0d", n_trig, afe.clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
