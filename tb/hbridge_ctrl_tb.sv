// Self-checking testbench of hbridge_ctrl.
// Plays a biphasic pulse sequence (idle, A sourcing, R sourcing, idle and a
// direct idle-to-R step) with the dropout comparator toggling, and checks:
// every change of drive state passes through DEAD_CYCLES = 2 cycles with
// all low-side switches open and both pumps off; the switch pattern of each
// state; that the sourcing pump follows the comparator; that no current
// code is issued outside a sourcing state; and that the bridge never
// connects both sides at once.
module hbridge_ctrl_tb;
  import bbci_pkg::*;
  logic clk = 0, rst_n = 0, dropout = 0;
  stim_sample_t sample = '0;
  hb_ctrl_t ctrl;
  logic [7:0] idac_code;
  hb_state_e state;
  logic bb_event;
  int checks = 0, failures = 0, gaps = 0, gap_len = 0, pump_on = 0;
  hb_state_e prev = HB_IDLE;

  hbridge_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // per-cycle rules
  always @(negedge clk) if (rst_n) begin
    dropout <= $urandom_range(0, 1);
    check(!(ctrl.idac_a && ctrl.idac_r), "both sides sinking");
    check(!(ctrl.gnd_a && ctrl.idac_a) && !(ctrl.gnd_r && ctrl.idac_r), "ground and sink");
    case (state)
      HB_IDLE:  check(ctrl == hb_ctrl_t'(8'b0011_1100) && idac_code == 0, "idle pattern");
      HB_A_SRC: check(ctrl.idac_r && !ctrl.idac_a && !ctrl.gnd_a && !ctrl.gnd_r &&
                      ctrl.pump_en_a == dropout && !ctrl.pump_en_r && ctrl.discharge_r &&
                      !ctrl.discharge_a, "A source pattern");
      HB_R_SRC: check(ctrl.idac_a && !ctrl.idac_r && !ctrl.gnd_a && !ctrl.gnd_r &&
                      ctrl.pump_en_r == dropout && !ctrl.pump_en_a && ctrl.discharge_a &&
                      !ctrl.discharge_r, "R source pattern");
      default:  check(!ctrl.idac_a && !ctrl.idac_r && !ctrl.gnd_a && !ctrl.gnd_r &&
                      !ctrl.pump_en_a && !ctrl.pump_en_r && idac_code == 0, "gap pattern");
    endcase
    if (ctrl.pump_en_a || ctrl.pump_en_r) pump_on++;
    if (state == HB_GAP) gap_len++;
    else begin
      if (gap_len != 0) begin
        check(gap_len == 2, $sformatf("gap of %0d cycles", gap_len));
        gaps++;
      end
      if (gap_len == 0) check(state == prev, "state change without gap");
      gap_len = 0;
      prev = state;
    end
  end

  task automatic hold(bit neg, int mag, int cycles);
    @(negedge clk); sample.neg = neg; sample.mag = 8'(mag);
    repeat (cycles - 1) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    hold(0, 0, 5);
    hold(0, 120, 12);
    // mid-phase the code follows the waveform
    @(negedge clk); sample.mag = 8'd77; @(negedge clk); @(negedge clk);
    check(state == HB_A_SRC && idac_code == 77, "IDAC code follows sample");
    hold(1, 120, 12);
    check(state == HB_R_SRC && idac_code == 120, "R phase code");
    hold(0, 0, 8);
    hold(1, 33, 8);
    hold(0, 0, 8);
    check(gaps == 5, $sformatf("break-before-make gaps %0d", gaps));
    check(pump_on > 3, "pump enabled by comparator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
