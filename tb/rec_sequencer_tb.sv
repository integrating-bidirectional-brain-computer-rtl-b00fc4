// Self-checking testbench of rec_sequencer at its default sizes (64
// channels, 16 cycles per slot). Checks the scan order, one slot_start and
// one adc_convert per slot at the right cycle, the frame strobes, the frame
// length of 64 x 16 = 1024 cycles (2 kS/s per channel at 2.048 MHz), and a
// shortened scan of 8 channels (128-cycle frames, 16 kS/s).
module rec_sequencer_tb;
  logic clk = 0, rst_n = 0, en = 0;
  logic [5:0] ch_last = 63, mux_ch;
  logic slot_start, adc_convert, frame_start, frame_end;
  int checks = 0, failures = 0;

  rec_sequencer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic run_frames(int nch, int nframes);
    int cyc = 0, last_fs = -1, slot_cyc = 0, exp_ch = 0;
    int frames = 0;
    // wait for a frame start
    @(negedge clk);
    while (!frame_start) @(negedge clk);
    last_fs = 0;
    for (int c = 0; c < nframes * nch * 16; c++) begin
      // at this point we're sampling outputs before the edge
      if (slot_start) begin
        check(mux_ch == 6'(exp_ch), $sformatf("channel %0d expected %0d", mux_ch, exp_ch));
        check(slot_cyc == 0, "slot_start position");
      end
      check(adc_convert == (slot_cyc == 4), "convert position");
      check(frame_start == (slot_cyc == 0 && exp_ch == 0), "frame_start");
      check(frame_end == (slot_cyc == 15 && exp_ch == nch - 1), "frame_end");
      if (frame_start && c > 0) begin
        check(c - last_fs == nch * 16, $sformatf("frame length %0d", c - last_fs));
        last_fs = c; frames++;
      end
      @(negedge clk);
      slot_cyc++;
      if (slot_cyc == 16) begin slot_cyc = 0; exp_ch = (exp_ch == nch - 1) ? 0 : exp_ch + 1; end
    end
    check(frames == nframes - 1, $sformatf("frames counted %0d", frames));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check(!slot_start && !adc_convert && mux_ch == 0, "idle while disabled");
    en = 1;
    run_frames(64, 3);
    // shorter scan: 8 channels at 16 kS/s
    en = 0; @(posedge clk); #1; ch_last = 7; en = 1;
    run_frames(8, 10);
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
