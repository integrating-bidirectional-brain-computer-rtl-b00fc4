// Self-checking testbench of delta_encoder.
// Part 1: random slots on random channels with random ADC codes; the CDAC
// code, the register step (+1 at >= 192, -1 below 64, else 0) and the
// output weight(register) + ADC are compared with a reference.
// Part 2: closed loop with a model of the analog chain (ADC sees the input
// minus 64 x (register - 512), clipped to 0..255). A slow ramp on one
// channel must be tracked and the output must equal input + 32896 exactly,
// showing the integrator keeps the ADC in range.
// Part 3: calibrated weights written through the look-up port are used.
module delta_encoder_tb;
  logic clk = 0, rst_n = 0, slot_start = 0, adc_valid = 0, wl_we = 0;
  logic [5:0] ch = 0, out_ch;
  logic [7:0] adc_code = 0;
  logic [3:0] wl_addr = 0;
  logic [15:0] wl_data = 0, out_data;
  logic [9:0] cdac_code;
  logic out_valid;
  logic [1:0] step_event;
  int checks = 0, failures = 0, ups = 0, downs = 0;
  int ref_reg [64];
  int w [10];

  delta_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic int wsum(int r);
    int s = 0;
    for (int k = 0; k < 10; k++) if (r[k]) s += w[k];
    return s;
  endfunction

  // one recording slot; returns the output sample
  task automatic slot(int c, int adc, output int outv);
    @(negedge clk); slot_start = 1; ch = 6'(c);
    @(negedge clk); slot_start = 0;
    @(negedge clk);
    check(int'(cdac_code) == ref_reg[c], $sformatf("cdac %0d ref %0d ch %0d", cdac_code, ref_reg[c], c));
    adc_valid = 1; adc_code = 8'(adc);
    @(negedge clk); adc_valid = 0;
    check(out_valid && out_ch == 6'(c), "out_valid/out_ch");
    begin
      int e;
      e = wsum(ref_reg[c]) + adc;
      if (e > 65535) e = 65535;
      check(int'(out_data) == e, $sformatf("out %0d exp %0d", out_data, e));
    end
    outv = out_data;
    if (adc >= 192 && ref_reg[c] < 1023) begin ref_reg[c]++; ups++; check(step_event == 2'b10, "up event"); end
    else if (adc < 64 && ref_reg[c] > 0) begin ref_reg[c]--; downs++; check(step_event == 2'b01, "down event"); end
    else check(step_event == 2'b00, "no event");
  endtask

  initial begin
    int o;
    for (int i = 0; i < 64; i++) ref_reg[i] = 512;
    for (int k = 0; k < 10; k++) w[k] = 64 << k;
    repeat (2) @(posedge clk); rst_n = 1;
    // part 1
    for (int n = 0; n < 1500; n++) slot($urandom_range(0, 63), $urandom_range(0, 255), o);
    // part 2: closed loop ramp on channel 5
    for (int n = 0; n < 400; n++) begin
      int v, a;
      v = n * 23 - 3000;                  // input in ADC steps
      a = 128 + v - 64 * (ref_reg[5] - 512);
      if (a < 0) a = 0; if (a > 255) a = 255;
      slot(5, a, o);
      if (n > 150) check(o == v + 32896, $sformatf("tracking out %0d in %0d", o, v));
    end
    // part 3: calibrated weights
    for (int k = 0; k < 10; k++) begin
      w[k] = (64 << k) + $urandom_range(0, 40) - 20;
      @(negedge clk); wl_we = 1; wl_addr = 4'(k); wl_data = 16'(w[k]);
    end
    @(negedge clk); wl_we = 0;
    for (int n = 0; n < 300; n++) slot($urandom_range(0, 63), $urandom_range(0, 255), o);
    check(ups > 50 && downs > 50, "both step directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
