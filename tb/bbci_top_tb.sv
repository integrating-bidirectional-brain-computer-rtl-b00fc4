// End-to-end testbench of bbci_top at its default sizes (64 channels,
// 4 stimulators x 4 sense channels, 32 taps, 16 cycles per slot), with the
// analog parts replaced by bbci_afe_model.
//
// The four stimulators play different programmed waveforms (square
// biphasic, half-sine, decaying and rising exponential; 32 samples of 128
// cycles, i.e. 2 ms at 2.048 MHz) every 50 frames (40 pulses/s at 2 kS/s),
// staggered so their cancellation windows overlap in time. Each canceller
// serves four distinct sense channels (16 stim-sense pairs); on channels 20
// and 50 the artifacts of two stimulators superimpose and one canceller
// learns their sum. The step size is 2^-7 (one CDAC step per 128 ADC
// steps of error). Phases:
//   1. cancellation off: artifacts clip the ADC;
//   2. cancellation and adaptation on for 60 pulses: in the last 10 pulses
//      the residual at the ADC on every sense channel must stay within one
//      CDAC step (64 ADC steps) plus the test tone, and the ADC must not clip;
//   3. adaptation with step 2^0 while the CDAC output is off: the error
//      no longer falls, the templates run into saturation; then clear;
//   4. scan shortened to 8 channels (16 kS/s).
// Checked throughout: one output sample per slot in channel order, frame
// length 64 x 16 = 1024 cycles (128 in phase 4), the H-bridge rules, and
// that each mechanism (pulse launch, canceller update, saturation, clear,
// integrator up/down step, break-before-make gap, pump enable, CMS cue,
// ADC clipping, scan-length change) happened.
module bbci_top_tb;
  import bbci_pkg::*;
  localparam int PERIOD = 50;

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

  // ---------------------------------------------------- event counters
  int n_trig = 0, n_upd = 0, n_sat = 0, n_clear = 0, n_up = 0, n_dn = 0, n_gap = 0;
  int n_pump = 0, n_cms = 0, n_frames = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) begin
      n_trig += ev_trigger[s]; n_upd += ev_update[s]; n_sat += ev_saturate[s];
      n_gap += ev_break[s]; n_pump += (hb_ctrl[s].pump_en_a || hb_ctrl[s].pump_en_r);
    end
    n_clear += (canc_clearing != 0);
    n_up += ev_int_step[1]; n_dn += ev_int_step[0]; n_cms += cms_cue;
    n_frames += ev_frame;
  end

  // ------------------------------------------- output stream protocol
  int exp_ch = 0, cur_last = 63;
  longint cyc = 0, last_frame = -1;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && rec_en) begin
    if (out_valid) begin
      check(out_ch == 6'(exp_ch), $sformatf("out_ch %0d expected %0d", out_ch, exp_ch));
      exp_ch = (exp_ch >= cur_last) ? 0 : exp_ch + 1;
    end
    if (ev_frame) begin
      if (last_frame >= 0)
        check(cyc - last_frame == 16 * (cur_last + 1), $sformatf("frame length %0d", cyc - last_frame));
      last_frame = cyc;
    end
    for (int s = 0; s < 4; s++) begin
      check(!(hb_ctrl[s].idac_a && hb_ctrl[s].idac_r), "both bridge sides sinking");
    end
  end

  // ------------------------------------------ residual measurement
  int   res_max = 0, clip_cnt = 0, res_over = 0;
  bit   measuring = 0;
  logic [5:0] slot_ch;
  always @(posedge clk) if (adc_convert) slot_ch <= mux_ch;
  function automatic bit is_sense(int c);
    return c inside {3, 5, 9, 20, 22, 24, 28, 31, 35, 40, 44, 50, 52, 55, 60, 63};
  endfunction
  always @(posedge clk) if (adc_valid && measuring && is_sense(slot_ch) && canc_window != 0) begin
    int r; r = int'(adc_code) - 128; if (r < 0) r = -r;
    if (r > res_max) res_max = r;
    if (adc_code == 0 || adc_code == 255) clip_cnt++;
    if (r > 64 + 12) begin res_over++; if (res_over < 10 && cancel_en) $display("over: t=%0t ch %0d adc %0d win %b int %0d canc %0d %0d %0d %0d", $time, slot_ch, adc_code, canc_window, cdac_int_code, cdac_canc_code[0], cdac_canc_code[1], cdac_canc_code[2], cdac_canc_code[3]); end
  end

  task automatic frames(int n);
    repeat (n) begin @(posedge clk); while (!ev_frame) @(posedge clk); end
  endtask

  // ------------------------------------------------ waveforms
  function automatic stim_sample_t wave_of(int s, int i);
    stim_sample_t w; real t, m;
    t = i;
    case (s)
      0: m = (i < 12) ? 100.0 : ((i < 16) ? 0.0 : ((i < 28) ? -100.0 : 0.0));
      1: m = (i < 16) ? 120.0 * $sin(3.14159 * t / 16.0) : -120.0 * $sin(3.14159 * (t - 16.0) / 16.0);
      2: m = (i < 16) ? 150.0 * $exp(-t / 5.0) : -150.0 * $exp(-(t - 16.0) / 5.0);
      default: m = (i < 16) ? 15.0 * $exp(t / 6.0) : -15.0 * $exp((t - 16.0) / 6.0);
    endcase
    w.neg = (m < 0.0);
    w.mag = 8'($rtoi(m < 0.0 ? -m : m));
    return w;
  endfunction

  initial begin
    int sense_list[4][4] = '{'{3, 5, 9, 20}, '{22, 24, 28, 31}, '{35, 40, 44, 50}, '{52, 55, 60, 63}};
    for (int s = 0; s < 4; s++) begin
      for (int j = 0; j < 4; j++) sense_ch[s][j] = 6'(sense_list[s][j]);
      stim_period[s] = 16'(PERIOD); stim_step_div[s] = 8'd127; stim_wave_len[s] = 6'd32;
      for (int j = 0; j < 4; j++) afe.set_coupling(s, sense_list[s][j], 0.002 + 0.0015 * ((s + j) % 4));
    end
    // superimposed artifacts: stimulators 1 and 3 also reach channels 20 and 50
    afe.set_coupling(1, 20, 0.003);
    afe.set_coupling(3, 50, 0.002);
    repeat (3) @(posedge clk); rst_n = 1;
    // program the four waveform memories
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 32; i++) begin
        @(negedge clk); wave_we = 1; wave_stim = 2'(s); wave_addr = 5'(i); wave_data = wave_of(s, i);
      end
    @(negedge clk); wave_we = 0;
    // clear template memories
    @(negedge clk); canc_clear = 1; @(negedge clk); canc_clear = 0;
    while (canc_clearing != 0) @(negedge clk);
    rec_en = 1;
    frames(2);
    // staggered start of the stimulators: 0, 3, 7, 10 frames apart
    @(negedge clk); stim_enable[0] = 1; stim_go[0] = 1; @(negedge clk); stim_go[0] = 0;
    frames(3);  @(negedge clk); stim_enable[1] = 1; stim_go[1] = 1; @(negedge clk); stim_go[1] = 0;
    frames(4);  @(negedge clk); stim_enable[2] = 1; stim_go[2] = 1; @(negedge clk); stim_go[2] = 0;
    frames(3);  @(negedge clk); stim_enable[3] = 1; stim_go[3] = 1; @(negedge clk); stim_go[3] = 0;

    // phase 1: no cancellation
    measuring = 1;
    frames(4 * PERIOD);
    $display("phase 1 (no cancellation): peak residual %0d, clipped samples %0d", res_max, clip_cnt);
    check(clip_cnt > 0, "artifacts should clip the ADC without cancellation");
    // phase 2: cancellation
    cancel_en = 1; adapt_en = 1; mu_shift = 7;
    measuring = 0;
    frames(50 * PERIOD);
    res_max = 0; clip_cnt = 0; res_over = 0; measuring = 1;
    frames(10 * PERIOD);
    measuring = 0;
    $display("phase 2 (converged): peak residual %0d, clipped %0d, over limit %0d", res_max, clip_cnt, res_over);
    check(clip_cnt == 0, "ADC clipping after convergence");
    check(res_over == 0, "residual above one CDAC step after convergence");
    // phase 3: full step: overshoot and saturation, then clear
    cancel_en = 0; mu_shift = 0;
    frames(6 * PERIOD);
    cancel_en = 1; mu_shift = 7;
    @(negedge clk); canc_clear = 1; @(negedge clk); canc_clear = 0;
    while (canc_clearing != 0) @(negedge clk);
    // phase 4: short scan of 8 channels (16 kS/s per channel)
    stim_enable = 0;
    frames(2);
    @(negedge clk); rec_en = 0; @(negedge clk); ch_last = 7; cur_last = 7; exp_ch = 0; last_frame = -1; rec_en = 1;
    frames(20);

    $display("events: trig %0d upd %0d sat %0d clear %0d up %0d dn %0d gap %0d pump %0d cms %0d frames %0d afe-clips %0d",
             n_trig, n_upd, n_sat, n_clear, n_up, n_dn, n_gap, n_pump, n_cms, n_frames, afe.clipped);
    check(n_trig > 4 * 60, "pulse launches");
    check(n_upd > 0, "canceller updates");
    check(n_sat > 0, "template saturation");
    check(n_clear > 0, "template clear");
    check(n_up > 0 && n_dn > 0, "integrator steps both ways");
    check(n_gap > 0, "break-before-make gaps");
    check(n_pump > 0, "charge pump enables");
    check(n_cms > 0, "CMS cue");
    check(afe.clipped > 0, "ADC clipping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * PERIOD * 1024) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
