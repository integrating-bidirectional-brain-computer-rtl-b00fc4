// Self-checking testbench of stim_waveform.
// Loads a biphasic waveform (5 cathodic samples, 2 zero, 5 anodic), then:
//  - a go request launches exactly one pulse at the next frame boundary,
//    with trigger high in that frame_end cycle;
//  - the played samples match memory, each lasting step_div + 1 cycles,
//    and the pulse length is wave_len x (step_div + 1) cycles;
//  - with period = 3 pulses launch every 3 frames;
//  - disabling stops launches.
module stim_waveform_tb;
  import bbci_pkg::*;
  localparam int FRAME = 100;
  logic clk = 0, rst_n = 0, frame_end = 0, enable = 0, go = 0, wr_en = 0;
  logic [15:0] period = 0;
  logic [7:0] step_div = 3;
  logic [5:0] wave_len = 12;
  logic [4:0] wr_addr = 0;
  stim_sample_t wr_data = '0, sample;
  logic active, trigger;
  int checks = 0, failures = 0, cyc = 0, launches = 0;
  int last_launch = -1;
  stim_sample_t wave [32];

  stim_waveform dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // free-running frame boundaries
  always @(negedge clk) begin
    cyc++;
    frame_end <= ((cyc % FRAME) == 0);
  end

  // pulse follower: checks each pulse in detail
  int launch_frames [$];
  initial begin
    forever begin
      @(posedge clk);
      if (trigger) begin
        check(frame_end, "trigger outside frame_end");
        launch_frames.push_back(cyc);
        launches++;
        // first sample appears after the edge
        for (int i = 0; i < 12; i++)
          for (int d = 0; d <= 3; d++) begin
            @(posedge clk);
            check(active, "active during pulse");
            check(sample == wave[i], $sformatf("sample %0d: %h vs %h", i, sample, wave[i]));
          end
        @(posedge clk);
        check(!active && sample == '0, "pulse ends after wave_len samples");
      end
    end
  end

  initial begin
    for (int i = 0; i < 32; i++) wave[i] = '0;
    for (int i = 0; i < 5; i++) begin wave[i].neg = 1; wave[i].mag = 8'(50 + 30 * i); end
    for (int i = 7; i < 12; i++) begin wave[i].neg = 0; wave[i].mag = 8'(200 - 10 * i); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 5'(i); wr_data = wave[i];
    end
    @(negedge clk); wr_en = 0;
    repeat (3 * FRAME) @(negedge clk);
    check(launches == 0, "no launch while disabled");
    enable = 1;
    repeat (2 * FRAME) @(negedge clk);
    check(launches == 0, "no launch without go or period");
    // single go, mid-frame
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    repeat (4 * FRAME) @(negedge clk);
    check(launches == 1, $sformatf("one launch after go, got %0d", launches));
    // periodic
    period = 3;
    repeat (12 * FRAME + 5) @(negedge clk);
    check(launches >= 4, $sformatf("periodic launches %0d", launches));
    for (int i = 2; i < launch_frames.size(); i++)
      check(launch_frames[i] - launch_frames[i-1] == 3 * FRAME, "period of 3 frames");
    enable = 0;
    begin
      int l0; l0 = launches;
      repeat (8 * FRAME) @(negedge clk);
      check(launches == l0, "disable stops launches");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40 * FRAME) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
