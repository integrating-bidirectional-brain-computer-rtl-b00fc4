// Self-checking testbench of tap_counter.
// Drives frame boundaries every FRAME cycles and random impulse triggers,
// and compares tap/active every cycle with a reference of the rule: a
// trigger opens the window (tap 0) at the next frame boundary, or at once
// if it coincides with one; the tap advances once per frame and the window
// closes after NUM_TAPS frames. Also checks the window length in frames.
module tap_counter_tb;
  localparam int NT = 32;
  localparam int FRAME = 5;
  logic clk = 0, rst_n = 0, trigger = 0, frame_end = 0;
  logic [4:0] tap;
  logic active;
  int checks = 0, failures = 0, cyc = 0;

  tap_counter dut (.*);

  always #5 clk = ~clk;

  // reference
  int r_tap = 0; bit r_act = 0, r_arm = 0;
  int windows = 0, open_frames = 0, full_windows = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 8000; c++) begin
      @(negedge clk);
      // compare state produced by previous edge
      checks++;
      if (tap !== 5'(r_tap) && r_act || active !== r_act) begin
        failures++;
        if (failures < 10) $display("cycle %0d: tap %0d/%0d active %0d/%0d", c, tap, r_tap, active, r_act);
      end
      frame_end = ((c % FRAME) == FRAME - 1);
      // triggers: rare, some on frame boundaries, some inside windows
      if (c < 3000) trigger = ($urandom_range(0, 399) == 0);
      else          trigger = ($urandom_range(0, 999) == 0) && frame_end;
      @(posedge clk);
      // reference update
      if (frame_end) begin
        if (r_arm || trigger) begin
          if (r_act && r_tap == NT-1) full_windows++;
          r_arm = 0; r_tap = 0; r_act = 1; windows++;
        end else if (r_act) begin
          if (r_tap == NT-1) begin r_act = 0; full_windows++; end
          else r_tap++;
        end
      end else if (trigger) r_arm = 1;
    end
    checks++;
    if (windows < 3 || full_windows < 2) begin
      failures++; $display("too few windows: %0d full %0d", windows, full_windows);
    end
    // explicit length check: one trigger at a boundary gives NT active frames
    trigger = 0; frame_end = 0;
    repeat (NT * FRAME + 20) @(posedge clk);
    @(negedge clk); trigger = 1; frame_end = 1; @(posedge clk); #1 trigger = 0; frame_end = 0;
    open_frames = 0;
    for (int f = 0; f < NT + 5; f++) begin
      if (active) open_frames++;
      repeat (FRAME - 1) @(posedge clk);
      @(negedge clk); frame_end = 1; @(posedge clk); #1 frame_end = 0;
    end
    checks++;
    if (open_frames != NT) begin failures++; $display("window %0d frames", open_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
