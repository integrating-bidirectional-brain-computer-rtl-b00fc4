// Recording multiplexer sequencer.
//
// One shared recording chain (electrode multiplexer, CDAC, amplifier, SAR
// ADC) serves every channel in turn. This block divides time into slots of
// CLK_PER_SLOT clock cycles, one slot per channel, and scans the channels
// 0..ch_last in order; one full scan is a frame, i.e. one sample of every
// channel. With the default 64 channels, 16 cycles per slot and a 2.048 MHz
// clock each channel is sampled at 2 kS/s (128 kS/s aggregate), the rate the
// chip records electrocorticography at. Scanning fewer channels (ch_last)
// raises the per-channel rate, e.g. 8 channels at 16 kS/s.
//
// Interface and timing (outputs decoded from the slot and channel counters,
// one-cycle active-high pulses):
//   mux_ch       channel selected for the current slot, stable for the slot
//   slot_start   first cycle of every slot
//   adc_convert  cycle CONVERT_AT of every slot: the CDAC has settled and the
//                ADC may sample
//   frame_start  slot_start of channel 0
//   frame_end    last cycle of the last slot of a frame
// en low holds the sequencer at the start of channel 0.
//
// The multiplexed organisation and the 64 x 2 kS/s rate follow the chip;
// the slot length, the convert position and the programmable scan length
// are choices of this design.
module rec_sequencer #(
  parameter int unsigned NUM_CH       = 64,
  parameter int unsigned CLK_PER_SLOT = 16,
  parameter int unsigned CONVERT_AT   = 4,
  localparam int unsigned CH_W        = $clog2(NUM_CH),
  localparam int unsigned SL_W        = $clog2(CLK_PER_SLOT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [CH_W-1:0] ch_last,
  output logic [CH_W-1:0] mux_ch,
  output logic            slot_start,
  output logic            adc_convert,
  output logic            frame_start,
  output logic            frame_end
);

  logic [SL_W-1:0] slot_cnt;

  localparam logic [SL_W-1:0] SLOT_LAST = SL_W'(CLK_PER_SLOT - 1);
  localparam logic [SL_W-1:0] CONV_POS  = SL_W'(CONVERT_AT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cnt <= '0;
      mux_ch   <= '0;
    end else if (!en) begin
      slot_cnt <= '0;
      mux_ch   <= '0;
    end else if (slot_cnt == SLOT_LAST) begin
      slot_cnt <= '0;
      mux_ch   <= (mux_ch >= ch_last) ? '0 : mux_ch + 1'b1;
    end else begin
      slot_cnt <= slot_cnt + 1'b1;
    end
  end

  assign slot_start  = en && (slot_cnt == '0);
  assign adc_convert = en && (slot_cnt == CONV_POS);
  assign frame_start = slot_start && (mux_ch == '0);
  assign frame_end   = en && (slot_cnt == SLOT_LAST) && (mux_ch >= ch_last);

  initial begin
    assert (CONVERT_AT < CLK_PER_SLOT) else $error("CONVERT_AT outside slot");
  end

endmodule
