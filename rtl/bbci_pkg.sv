// Shared sizes, types and constants of the bidirectional neural interface
// back-end.
//
// The chip records 64 channels through one multiplexed chain (2 kS/s per
// channel), drives four H-bridge stimulators, and cancels stimulus artifacts
// with four lookup-based canceller back-ends, each serving four sense
// channels. The numbers below are the chip's own (64 channels, 4 stimulators,
// 4 sense channels per stimulator, 32 taps of 10 bits, 10-bit CDAC, 8-bit ADC,
// 16-bit output, 8-bit IDAC). Timing constants (clock cycles per channel slot,
// the ADC thresholds of the delta encoder, the waveform memory depth) are
// choices of this design.
package bbci_pkg;

  localparam int unsigned NUM_CH         = 64;  // recording channels
  localparam int unsigned NUM_STIM       = 4;   // H-bridge stimulators
  localparam int unsigned SENSE_PER_STIM = 4;   // sense channels per canceller
  localparam int unsigned NUM_TAPS       = 32;  // template samples per pair
  localparam int unsigned TAP_W          = 10;  // template value width (CDAC)
  localparam int unsigned ADC_W          = 8;   // SAR ADC resolution
  localparam int unsigned INT_W          = 10;  // delta-encoder register
  localparam int unsigned OUT_W          = 16;  // reconstructed sample
  localparam int unsigned IDAC_W         = 8;   // stimulator current code
  localparam int unsigned CH_W           = $clog2(NUM_CH);

  // Drive state of one H-bridge. A_SRC: the A electrode is sourced from its
  // charge pump and current returns through the R side into the IDAC.
  // R_SRC is the mirror image. IDLE grounds both electrodes (passive
  // discharge, resting bias at ground). GAP opens every switch for the
  // break-before-make interval between two drive states.
  typedef enum logic [1:0] {
    HB_IDLE  = 2'd0,
    HB_A_SRC = 2'd1,
    HB_R_SRC = 2'd2,
    HB_GAP   = 2'd3
  } hb_state_e;

  // Controls of one H-bridge output stage (Fig. 4-2 / 4-3 of the design).
  typedef struct packed {
    logic pump_en_a;     // enable the resonant charge pump of side A
    logic pump_en_r;     // enable the resonant charge pump of side R
    logic discharge_a;   // discharge pump A: reverse-biases diode switch A
    logic discharge_r;   // discharge pump R: reverse-biases diode switch R
    logic gnd_a;         // connect HVA A to ground
    logic gnd_r;         // connect HVA R to ground
    logic idac_a;        // connect HVA A to the shared sinking IDAC
    logic idac_r;        // connect HVA R to the shared sinking IDAC
  } hb_ctrl_t;

  // One waveform sample: polarity (1 = R side sources) and IDAC magnitude.
  // A zero magnitude means no current (both electrodes grounded).
  typedef struct packed {
    logic              neg;
    logic [IDAC_W-1:0] mag;
  } stim_sample_t;

endpackage
