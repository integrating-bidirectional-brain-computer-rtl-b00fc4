// Digital back-end of a single-chip bidirectional neural interface.
//
// The chip records NUM_CH channels through one multiplexed, delta-encoded
// recording chain and drives NUM_STIM independent H-bridge stimulators.
// Stimulus artifacts are far larger than neural signals, so they are
// removed before the amplifier: for each stimulator an adaptive back-end
// learns the artifact that its pulses cause on up to SENSE sense channels
// and plays it into the input CDAC, where the CDAC sums the four canceller
// outputs and the delta-encoder value and subtracts them from the input.
//
// Blocks:
//   rec_sequencer       channel scan, slot and frame strobes, ADC convert
//   delta_encoder       per-channel integrator, CDAC code, 16-bit output
//   stim_waveform  x4   programmable current waveform, frame-aligned launch,
//                       impulse trigger to its canceller
//   hbridge_ctrl   x4   H-bridge switches, IDAC code, pump enables
//   artifact_canceller x4  tap counter, 128 x 10-bit template memory and
//                       shared shift-based LMS update
//
// The analog parts are outside this module and meet it at its ports: the
// electrode multiplexer (mux_ch), the CDAC (cdac_int_code plus the four
// signed cdac_canc_code words), the SAR ADC (adc_convert out, adc_valid and
// adc_code in, within the same slot), the common-mode suppression switches
// (cms_cue), and per stimulator the charge pumps, diode switches, HVAs and
// IDAC (hb_ctrl, idac_code) and the supply-enable comparator (dropout).
// Configuration is a set of plain inputs; the stimulator waveform memories
// are written through wave_we/wave_stim/wave_addr/wave_data.
//
// Timing: one slot is CLK_PER_SLOT cycles; the CDAC codes are stable from
// the third cycle of a slot to its end; the ADC result must arrive before
// the slot ends. With the defaults a 2.048 MHz clock gives 64 channels at
// 2 kS/s.
//
// The partitioning follows the chip; the port-level configuration and the
// slot timing are choices of this design.
module bbci_top
  import bbci_pkg::*;
#(
  parameter int unsigned P_NUM_CH       = NUM_CH,
  parameter int unsigned P_NUM_STIM     = NUM_STIM,
  parameter int unsigned P_SENSE        = SENSE_PER_STIM,
  parameter int unsigned P_NUM_TAPS     = NUM_TAPS,
  parameter int unsigned P_CLK_PER_SLOT = 16,
  parameter int unsigned P_CONVERT_AT   = 4,
  parameter int unsigned P_WAVE_DEPTH   = 32,
  localparam int unsigned CHW           = $clog2(P_NUM_CH),
  localparam int unsigned TAW           = $clog2(P_NUM_TAPS),
  localparam int unsigned WAW           = $clog2(P_WAVE_DEPTH),
  localparam int unsigned SW_W          = (P_NUM_STIM > 1) ? $clog2(P_NUM_STIM) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---- recording configuration
  input  logic                    rec_en,
  input  logic [CHW-1:0]          ch_last,
  input  logic                    wl_we,
  input  logic [$clog2(INT_W)-1:0] wl_addr,
  input  logic [OUT_W-1:0]        wl_data,
  // ---- recording analog front-end
  output logic [CHW-1:0]          mux_ch,
  output logic                    adc_convert,
  input  logic                    adc_valid,
  input  logic [ADC_W-1:0]        adc_code,
  output logic [INT_W-1:0]        cdac_int_code,
  output logic signed [TAP_W-1:0] cdac_canc_code [P_NUM_STIM],
  output logic                    cms_cue,
  // ---- recorded samples
  output logic                    out_valid,
  output logic [CHW-1:0]          out_ch,
  output logic [OUT_W-1:0]        out_data,
  // ---- canceller configuration and status
  input  logic                    cancel_en,
  input  logic                    adapt_en,
  input  logic [3:0]              mu_shift,
  input  logic                    canc_clear,
  input  logic [CHW-1:0]          sense_ch [P_NUM_STIM][P_SENSE],
  output logic [P_NUM_STIM-1:0]   canc_window,
  output logic [P_NUM_STIM-1:0]   canc_clearing,
  // ---- stimulator configuration
  input  logic [P_NUM_STIM-1:0]   stim_enable,
  input  logic [P_NUM_STIM-1:0]   stim_go,
  input  logic [15:0]             stim_period [P_NUM_STIM],
  input  logic [7:0]              stim_step_div [P_NUM_STIM],
  input  logic [WAW:0]            stim_wave_len [P_NUM_STIM],
  input  logic                    wave_we,
  input  logic [SW_W-1:0]         wave_stim,
  input  logic [WAW-1:0]          wave_addr,
  input  stim_sample_t            wave_data,
  // ---- stimulator output stages
  input  logic [P_NUM_STIM-1:0]   dropout,
  output hb_ctrl_t                hb_ctrl [P_NUM_STIM],
  output logic [IDAC_W-1:0]       idac_code [P_NUM_STIM],
  output logic [P_NUM_STIM-1:0]   stim_active,
  // ---- event strobes (observability)
  output logic [P_NUM_STIM-1:0]   ev_trigger,
  output logic [P_NUM_STIM-1:0]   ev_update,
  output logic [P_NUM_STIM-1:0]   ev_saturate,
  output logic [P_NUM_STIM-1:0]   ev_break,
  output logic [1:0]              ev_int_step,
  output logic                    ev_frame
);

  logic slot_start, frame_start, frame_end;

  rec_sequencer #(
    .NUM_CH(P_NUM_CH), .CLK_PER_SLOT(P_CLK_PER_SLOT), .CONVERT_AT(P_CONVERT_AT)
  ) u_seq (
    .clk, .rst_n, .en(rec_en), .ch_last, .mux_ch, .slot_start, .adc_convert,
    .frame_start, .frame_end
  );
  assign ev_frame = frame_end;

  delta_encoder #(
    .NUM_CH(P_NUM_CH), .ADC_W(ADC_W), .INT_W(INT_W), .OUT_W(OUT_W)
  ) u_denc (
    .clk, .rst_n, .slot_start, .ch(mux_ch), .adc_valid, .adc_code,
    .wl_we, .wl_addr, .wl_data, .cdac_code(cdac_int_code),
    .out_valid, .out_ch, .out_data, .step_event(ev_int_step)
  );

  for (genvar s = 0; s < P_NUM_STIM; s++) begin : g_stim
    stim_sample_t smp;
    logic         trig;

    stim_waveform #(.WAVE_DEPTH(P_WAVE_DEPTH)) u_wave (
      .clk, .rst_n, .frame_end, .enable(stim_enable[s]), .go(stim_go[s]),
      .period(stim_period[s]), .step_div(stim_step_div[s]),
      .wave_len(stim_wave_len[s]),
      .wr_en(wave_we && wave_stim == SW_W'(s)), .wr_addr(wave_addr),
      .wr_data(wave_data), .sample(smp), .active(stim_active[s]),
      .trigger(trig)
    );
    assign ev_trigger[s] = trig;

    hbridge_ctrl u_hb (
      .clk, .rst_n, .sample(smp), .dropout(dropout[s]), .ctrl(hb_ctrl[s]),
      .idac_code(idac_code[s]), .state(), .bb_event(ev_break[s])
    );

    logic [TAW-1:0] tap_unused;
    artifact_canceller #(
      .NUM_CH(P_NUM_CH), .SENSE(P_SENSE), .NUM_TAPS(P_NUM_TAPS),
      .TAP_W(TAP_W), .ADC_W(ADC_W)
    ) u_canc (
      .clk, .rst_n, .slot_start, .ch(mux_ch), .frame_end, .adc_valid,
      .adc_code, .trigger(trig), .cancel_en, .adapt_en, .mu_shift,
      .clear(canc_clear), .sense_ch(sense_ch[s]),
      .cdac_code(cdac_canc_code[s]), .window(canc_window[s]),
      .tap(tap_unused), .clearing(canc_clearing[s]),
      .upd_event(ev_update[s]), .sat_event(ev_saturate[s])
    );
  end

  // Common-mode suppression cue to the input switches while any
  // stimulator is driving.
  assign cms_cue = |stim_active;

endmodule
