// Programmable current-waveform player of one stimulator.
//
// Each of the four stimulators delivers an arbitrary, digitally programmed
// current waveform (square biphasic pulses, half-sines, rising or decaying
// exponentials, ...). The waveform is stored as up to WAVE_DEPTH samples,
// each a polarity bit and an 8-bit IDAC magnitude (bbci_pkg::stim_sample_t),
// and played back at one sample per (step_div + 1) clock cycles. A positive
// sample makes the A electrode source current, a negative one the R
// electrode, and a zero sample leaves both electrodes grounded.
//
// A pulse is launched only at a recording frame boundary (frame_end), either
// every `period` frames (period != 0) or once after a `go` request. The
// launch emits a one-cycle `trigger`, the impulse that starts the artifact
// canceller's tap counter in the same cycle, so every pulse has the same
// timing relative to the recording samples and the learned template lines
// up from pulse to pulse. A launch is skipped while a pulse is still
// playing.
//
// Interface and timing: wr_* writes one sample (any time); sample and
// active are registered; trigger is combinational and high in the launch
// cycle (a frame_end cycle); the first sample appears the cycle after the
// launch and each lasts step_div + 1 cycles; wave_len samples are played
// (wave_len = 0 plays none).
//
// From the chip: independent programmable waveforms per stimulator and the
// 8-bit IDAC code. Choices of this design: the sample-memory format and
// depth, the playback divider, the frame-aligned launch and the period
// counter.
module stim_waveform
  import bbci_pkg::*;
#(
  parameter int unsigned WAVE_DEPTH = 32,
  parameter int unsigned DIV_W      = 8,
  parameter int unsigned PERIOD_W   = 16,
  localparam int unsigned WA_W      = $clog2(WAVE_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_end,
  input  logic               enable,
  input  logic               go,
  input  logic [PERIOD_W-1:0] period,
  input  logic [DIV_W-1:0]   step_div,
  input  logic [WA_W:0]      wave_len,
  input  logic               wr_en,
  input  logic [WA_W-1:0]    wr_addr,
  input  stim_sample_t       wr_data,
  output stim_sample_t       sample,
  output logic               active,
  output logic               trigger
);

  stim_sample_t mem [WAVE_DEPTH];

  logic [WA_W:0]       idx;
  logic [DIV_W-1:0]    div_cnt;
  logic [PERIOD_W-1:0] frame_cnt;
  logic                go_pend;

  logic period_hit, launch;
  assign period_hit = (period != '0) && (frame_cnt >= period - 1'b1);
  assign launch     = frame_end && enable && !active && wave_len != '0 &&
                      (go_pend || go || period_hit);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      div_cnt   <= '0;
      frame_cnt <= '0;
      go_pend   <= 1'b0;
      active    <= 1'b0;
      sample    <= '0;
    end else begin
      if (go) go_pend <= 1'b1;
      if (!enable) begin
        frame_cnt <= '0;
        go_pend   <= 1'b0;
      end else if (frame_end) begin
        frame_cnt <= launch ? '0 : ((frame_cnt == '1) ? frame_cnt : frame_cnt + 1'b1);
      end
      if (launch) begin
        go_pend <= 1'b0;
        active  <= 1'b1;
        idx     <= '0;
        div_cnt <= '0;
        sample  <= mem[0];
      end else if (active) begin
        if (div_cnt == step_div) begin
          div_cnt <= '0;
          if (idx + 1'b1 >= wave_len) begin
            active <= 1'b0;
            sample <= '0;
          end else begin
            idx    <= idx + 1'b1;
            sample <= mem[WA_W'(idx + 1'b1)];
          end
        end else begin
          div_cnt <= div_cnt + 1'b1;
        end
      end
    end
  end

  // The trigger leaves in the launch cycle, together with frame_end, so the
  // tap counter opens its window on the same frame boundary.
  assign trigger = launch;

endmodule
