// Coefficient update of the impulse-input LMS artifact canceller.
//
// With a discrete impulse as the filter input, the LMS update
// c(n+1) = c(n) + mu * e(n) * x(n-N) reduces for the one active tap to
// y <- y + mu * e, because x is either zero or one. The step size mu is a
// power of two, so the multiplication is an arithmetic right shift of the
// error by mu_shift bits, rounded to nearest (half of the divisor is added
// first): a plain shift would round every negative error to at least -1
// and every small positive one to 0, biasing the template. The sum is
// saturated to the symmetric range +/-(2^(TAP_W-1)-1) of the template word,
// as the chip's earlier canceller saturated its taps to +/-63.
//
// The error is the recording output for the slot: the ADC code in offset
// binary, re-centred around zero (e = adc_code - 2^(ADC_W-1)). A positive
// error means the CDAC still subtracts too little, so the stored value
// grows.
//
// Purely combinational. The shift form of mu and the saturation follow the
// chip; taking the error from the ADC code, re-centring it and rounding the
// shift are choices of this design.
module lms_update #(
  parameter int unsigned TAP_W = 10,
  parameter int unsigned ADC_W = 8
) (
  input  logic signed [TAP_W-1:0] y_old,
  input  logic        [ADC_W-1:0] adc_code,
  input  logic        [3:0]       mu_shift,
  output logic signed [TAP_W-1:0] y_new,
  output logic                    saturated
);

  localparam int signed YMAX = (1 <<< (TAP_W - 1)) - 1;

  localparam int unsigned EW = ADC_W + 17;   // room for the rounding term

  logic signed [ADC_W:0]       err;
  logic signed [EW-1:0]        half;
  logic signed [EW-1:0]        step;
  logic signed [TAP_W+ADC_W:0] sum;

  always_comb begin
    err  = $signed({1'b0, adc_code}) - $signed((ADC_W+1)'(1 << (ADC_W - 1)));
    half = (mu_shift == 4'd0) ? '0 : (EW'(1) <<< (mu_shift - 4'd1));
    step = (EW'(err) + half) >>> mu_shift;
    sum  = (TAP_W+ADC_W+1)'(y_old) + (TAP_W+ADC_W+1)'(step);
    saturated = 1'b0;
    if (sum > (TAP_W+ADC_W+1)'(YMAX)) begin
      y_new     = TAP_W'(YMAX);
      saturated = 1'b1;
    end else if (sum < -(TAP_W+ADC_W+1)'(YMAX)) begin
      y_new     = -TAP_W'(YMAX);
      saturated = 1'b1;
    end else begin
      y_new = sum[TAP_W-1:0];
    end
  end

endmodule
