// Delta-encoding feedback loop of the multiplexed recording chain.
//
// Neural signals carry most of their power at low frequencies. Instead of a
// high-resolution ADC, each channel keeps a 10-bit integrator register whose
// value drives a capacitive DAC (CDAC) at the amplifier input and subtracts
// the slow part of the signal there; the 8-bit SAR ADC then only has to
// resolve the small remainder. After every conversion a three-level decision
// on the ADC code moves that channel's register by +1, 0 or -1 CDAC step, so
// the ADC is kept inside its range. The output sample is rebuilt digitally
// as weight(register << 6) + ADC code: one CDAC step equals 64 ADC steps.
//
// The register file holds one register per channel (64 x 10 bits), so the
// loop is time-multiplexed over all channels like the analog chain. The
// weight look-up holds one 16-bit weight per CDAC bit (ideal: 64 << k) so
// that a mismatched CDAC can be calibrated by writing measured weights.
//
// Interface and timing:
//   slot_start/ch   at slot start the register of channel ch is read and
//                   cdac_code shows it from the next cycle to the end of the
//                   slot (the CDAC value the ADC then sees).
//   adc_valid       one-cycle strobe with adc_code for the channel of the
//                   current slot; the register is updated and out_valid,
//                   out_ch, out_data follow one cycle later.
//   wl_*            writes weight wl_addr (0..INT_W-1).
// Reset sets every register to mid-scale and every weight to its ideal value.
//
// From the chip: the 64 x 10-bit register, the three-level decision, the
// << 6 alignment, the weight look-up and the 8-bit/16-bit widths. Choices of
// this design: the decision thresholds (1/4 and 3/4 of the ADC range), the
// per-bit organisation of the weight look-up, mid-scale reset and output
// saturation at the 16-bit limits.
module delta_encoder #(
  parameter int unsigned NUM_CH = 64,
  parameter int unsigned ADC_W  = 8,
  parameter int unsigned INT_W  = 10,
  parameter int unsigned OUT_W  = 16,
  parameter int unsigned SHIFT  = 6,
  parameter int unsigned TH_HI  = 192,  // adc >= TH_HI -> +1 step
  parameter int unsigned TH_LO  = 64,   // adc <  TH_LO -> -1 step
  localparam int unsigned CH_W  = $clog2(NUM_CH),
  localparam int unsigned WA_W  = $clog2(INT_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot_start,
  input  logic [CH_W-1:0]  ch,
  input  logic             adc_valid,
  input  logic [ADC_W-1:0] adc_code,
  input  logic             wl_we,
  input  logic [WA_W-1:0]  wl_addr,
  input  logic [OUT_W-1:0] wl_data,
  output logic [INT_W-1:0] cdac_code,
  output logic             out_valid,
  output logic [CH_W-1:0]  out_ch,
  output logic [OUT_W-1:0] out_data,
  output logic [1:0]       step_event   // [1] up step taken, [0] down step
);

  localparam logic [INT_W-1:0] INT_MID = INT_W'(1) << (INT_W - 1);
  localparam logic [INT_W-1:0] INT_MAX = '1;

  logic [INT_W-1:0] regs [NUM_CH];
  logic [OUT_W-1:0] weight [INT_W];
  logic [CH_W-1:0]  cur_ch;

  // Weighted reconstruction of the register value driving the CDAC.
  logic [OUT_W+1:0] lut_sum;
  always_comb begin
    lut_sum = '0;
    for (int k = 0; k < INT_W; k++)
      if (cdac_code[k]) lut_sum += (OUT_W+2)'(weight[k]);
  end

  logic up, dn;
  assign up = (adc_code >= ADC_W'(TH_HI));
  assign dn = (adc_code <  ADC_W'(TH_LO));

  logic [OUT_W+1:0] full;
  assign full = lut_sum + (OUT_W+2)'(adc_code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CH; i++) regs[i] <= INT_MID;
      for (int k = 0; k < INT_W; k++)  weight[k] <= OUT_W'(64'(1) << (k + SHIFT));
      cdac_code  <= INT_MID;
      cur_ch     <= '0;
      out_valid  <= 1'b0;
      out_ch     <= '0;
      out_data   <= '0;
      step_event <= '0;
    end else begin
      out_valid  <= 1'b0;
      step_event <= '0;
      if (wl_we) weight[wl_addr] <= wl_data;
      if (slot_start) begin
        cur_ch    <= ch;
        cdac_code <= regs[ch];
      end
      if (adc_valid) begin
        if (up && cdac_code != INT_MAX) begin
          regs[cur_ch]  <= cdac_code + 1'b1;
          step_event[1] <= 1'b1;
        end else if (dn && cdac_code != '0) begin
          regs[cur_ch]  <= cdac_code - 1'b1;
          step_event[0] <= 1'b1;
        end
        out_valid <= 1'b1;
        out_ch    <= cur_ch;
        out_data  <= (full > (OUT_W+2)'({OUT_W{1'b1}})) ? '1 : full[OUT_W-1:0];
      end
    end
  end

  initial begin
    assert (TH_LO < TH_HI) else $error("decision thresholds out of order");
  end

endmodule
