// One lookup-based adaptive artifact canceller back-end (one per stimulator).
//
// A full LMS/FIR canceller needs multipliers and adders for every tap. Here
// the filter input is an impulse at the start of each stimulus pulse, so
// the filter reduces to a writable look-up table holding the artifact
// waveform itself: one word per (tap n, sense channel R). A tap counter
// gives n (frames since the pulse). In every recording slot that belongs to
// one of this back-end's SENSE sense channels while the window is open, the
// stored value y_R(n) is read and sent to the CDAC, which subtracts it at
// the amplifier input; when the ADC has converted the slot, the residual
// drives one shared update unit, y <- sat(y + (e >>> mu)), and the result
// is written back for the next pulse. The update hardware thus visits the
// sense channels first and then moves to the next tap.
//
// Interface and timing:
//   slot_start/ch  slot of recording channel ch begins; if ch equals one of
//                  sense_ch[0..SENSE-1] (lowest index wins) and the window
//                  is open, the word {tap, index} is read.
//   cdac_code      signed template value for the current slot, valid from
//                  two cycles after slot_start to the next slot_start; zero
//                  outside the window, on other channels, or if !cancel_en.
//   adc_valid      conversion result of the current slot; with adapt_en the
//                  updated word is written back in the same cycle.
//   trigger        impulse trigger from the stimulator (see tap_counter).
//   clear          starts writing zero to every word, one per cycle;
//                  clearing is high meanwhile and no slot is served.
//   upd_event      one-cycle pulse for every write-back; sat_event when the
//                  update saturated.
//
// From the chip: impulse input, lookup table in SRAM indexed by tap and
// sense channel, shift-based step size, one back-end per stimulator serving
// four sense channels with 32 taps of 10 bits, channel-first update order.
// Choices of this design: the programmable sense-channel map, the clear
// sequence and the slot timing.
module artifact_canceller #(
  parameter int unsigned NUM_CH   = 64,
  parameter int unsigned SENSE    = 4,
  parameter int unsigned NUM_TAPS = 32,
  parameter int unsigned TAP_W    = 10,
  parameter int unsigned ADC_W    = 8,
  localparam int unsigned CH_W    = $clog2(NUM_CH),
  localparam int unsigned SEL_W   = (SENSE > 1) ? $clog2(SENSE) : 1,
  localparam int unsigned TAP_AW  = $clog2(NUM_TAPS),
  localparam int unsigned DEPTH   = NUM_TAPS * SENSE,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    slot_start,
  input  logic [CH_W-1:0]         ch,
  input  logic                    frame_end,
  input  logic                    adc_valid,
  input  logic [ADC_W-1:0]        adc_code,
  input  logic                    trigger,
  input  logic                    cancel_en,
  input  logic                    adapt_en,
  input  logic [3:0]              mu_shift,
  input  logic                    clear,
  input  logic [CH_W-1:0]         sense_ch [SENSE],
  output logic signed [TAP_W-1:0] cdac_code,
  output logic                    window,
  output logic [TAP_AW-1:0]       tap,
  output logic                    clearing,
  output logic                    upd_event,
  output logic                    sat_event
);

  // ---------------------------------------------------------------- taps
  tap_counter #(.NUM_TAPS(NUM_TAPS)) u_tap (
    .clk, .rst_n, .trigger, .frame_end, .tap, .active(window)
  );

  // ------------------------------------------------ sense channel matching
  logic             hit_now;
  logic [SEL_W-1:0] sel_now;
  always_comb begin
    hit_now = 1'b0;
    sel_now = '0;
    for (int j = SENSE - 1; j >= 0; j--)
      if (sense_ch[j] == ch) begin
        hit_now = 1'b1;
        sel_now = SEL_W'(j);
      end
  end

  // ------------------------------------------------------- slot control
  logic          slot_hit;     // current slot is served by this back-end
  logic [AW-1:0] slot_addr;
  logic          rd_pend;
  logic [AW-1:0] clr_addr;
  logic          written;      // write-back done for this slot

  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [TAP_W-1:0] mem_wdata, mem_rdata;
  logic signed [TAP_W-1:0] y_cur, y_new;
  logic          sat;

  logic [AW-1:0] addr_now;
  if (SENSE > 1) begin : g_addr
    assign addr_now = AW'({tap, sel_now});
  end else begin : g_addr1
    assign addr_now = AW'(tap);
  end

  lms_update #(.TAP_W(TAP_W), .ADC_W(ADC_W)) u_upd (
    .y_old(y_cur), .adc_code, .mu_shift, .y_new, .saturated(sat)
  );

  logic do_read, do_write;
  assign do_read  = slot_start && !clearing && window && hit_now;
  assign do_write = adc_valid && slot_hit && adapt_en && !rd_pend && !written;

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = slot_addr;
    mem_wdata = y_new;
    if (clearing) begin
      mem_en    = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = clr_addr;
      mem_wdata = '0;
    end else if (do_read) begin
      mem_en   = 1'b1;
      mem_addr = addr_now;
    end else if (do_write) begin
      mem_en = 1'b1;
      mem_we = 1'b1;
    end
  end

  artifact_sram #(.DEPTH(DEPTH), .WIDTH(TAP_W)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_hit  <= 1'b0;
      slot_addr <= '0;
      rd_pend   <= 1'b0;
      written   <= 1'b0;
      y_cur     <= '0;
      cdac_code <= '0;
      clearing  <= 1'b0;
      clr_addr  <= '0;
      upd_event <= 1'b0;
      sat_event <= 1'b0;
    end else begin
      upd_event <= 1'b0;
      sat_event <= 1'b0;
      rd_pend   <= 1'b0;
      if (clear && !clearing) begin
        clearing <= 1'b1;
        clr_addr <= '0;
      end else if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == AW'(DEPTH - 1)) clearing <= 1'b0;
      end
      if (slot_start) begin
        slot_hit  <= do_read;
        slot_addr <= addr_now;
        rd_pend   <= do_read;
        written   <= 1'b0;
        cdac_code <= '0;
      end
      if (rd_pend) begin
        y_cur     <= mem_rdata;
        cdac_code <= cancel_en ? mem_rdata : '0;
      end
      if (do_write && !clearing) begin
        written   <= 1'b1;
        upd_event <= 1'b1;
        sat_event <= sat;
      end
    end
  end

endmodule
