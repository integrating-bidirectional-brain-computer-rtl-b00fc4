// Behavioural model of the analog parts around the digital back-end, for
// simulation only (not synthesizable): tissue, electrode multiplexer, input
// CDAC, amplifier, 8-bit SAR ADC, and per stimulator the output stage with
// its charge pumps and the supply-enable (dropout) comparator.
//
// All voltages are in ADC steps at the ADC input. One CDAC step is 64 ADC
// steps. Each stimulator drives a current i = +/- idac_code (sign from the
// H-bridge state). The artifact it causes is a first-order state that is
// pushed by i and decays with time constant TAU_CYC clock cycles, seen by
// channel c with gain coup[s][c]. Every channel also carries a small test
// tone and a slow offset. At adc_convert the model samples
//   v = tone + offset + sum_s coup[s][c] * art_s
//       - 64 * (cdac_int - 512) - 64 * sum_s cdac_canc_s
// and ADC_LAT cycles later returns clip(128 + v, 0, 255) with adc_valid.
//
// Stimulator output stage: each side's supply voltage rises while its pump
// is enabled and leaks otherwise; the dropout comparator reports that the
// supply is below the voltage the programmed current needs in the load.
module bbci_afe_model
  import bbci_pkg::*;
#(
  parameter int  N_CH    = 64,
  parameter int  N_STIM  = 4,
  parameter int  ADC_LAT = 9,
  parameter real TAU_CYC = 1500.0,
  parameter real TONE    = 6.0
) (
  input  logic                    clk,
  input  logic [$clog2(N_CH)-1:0] mux_ch,
  input  logic                    adc_convert,
  input  logic [INT_W-1:0]        cdac_int_code,
  input  logic signed [TAP_W-1:0] cdac_canc_code [N_STIM],
  input  hb_ctrl_t                hb_ctrl [N_STIM],
  input  logic [IDAC_W-1:0]       idac_code [N_STIM],
  output logic                    adc_valid,
  output logic [ADC_W-1:0]        adc_code,
  output logic [N_STIM-1:0]       dropout
);

  real coup [N_STIM][N_CH];
  real art  [N_STIM];
  real vsup [N_STIM];
  real gain [N_STIM];
  longint cyc = 0;
  int  lat = -1;
  int  held;
  int  clipped = 0;   // samples the ADC clipped

  initial begin
    for (int s = 0; s < N_STIM; s++) begin
      art[s] = 0.0; vsup[s] = 0.0;
      gain[s] = 0.9 + 0.25 * s;
      for (int c = 0; c < N_CH; c++) coup[s][c] = 0.0;
    end
    adc_valid = 0; adc_code = 128; dropout = '0;
  end

  function automatic void set_coupling(int s, int c, real g);
    coup[s][c] = g;
  endfunction

  always @(posedge clk) begin
    cyc++;
    for (int s = 0; s < N_STIM; s++) begin
      real i;
      i = 0.0;
      if (hb_ctrl[s].idac_r) i =  real'(idac_code[s]);   // A side sources
      if (hb_ctrl[s].idac_a) i = -real'(idac_code[s]);   // R side sources
      art[s] = art[s] + gain[s] * i - art[s] / TAU_CYC;
      // output stage
      if (hb_ctrl[s].pump_en_a || hb_ctrl[s].pump_en_r) vsup[s] = vsup[s] + 0.8;
      else vsup[s] = vsup[s] * 0.97;
      dropout[s] <= (hb_ctrl[s].idac_a || hb_ctrl[s].idac_r) &&
                    (vsup[s] < 0.05 * real'(idac_code[s]));
    end
    adc_valid <= 1'b0;
    if (adc_convert) begin
      real v;
      v = TONE * $sin(2.0 * 3.14159265 * real'(cyc) / 40960.0) + 30.0 * real'(mux_ch % 5);
      for (int s = 0; s < N_STIM; s++) v += coup[s][mux_ch] * art[s];
      v -= 64.0 * (real'(cdac_int_code) - 512.0);
      for (int s = 0; s < N_STIM; s++) v -= 64.0 * real'(cdac_canc_code[s]);
      held = 128 + $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
      if (held < 0)   begin held = 0;   clipped++; end
      if (held > 255) begin held = 255; clipped++; end
      lat = ADC_LAT;
    end else if (lat > 0) begin
      lat--;
      if (lat == 0) begin
        adc_valid <= 1'b1;
        adc_code  <= 8'(held);
        lat = -1;
      end
    end
  end

endmodule
