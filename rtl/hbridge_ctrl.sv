// H-bridge switch sequencer of one stimulator.
//
// The stimulator is an H-bridge between the A and R electrodes. One side
// sources: its resonant charge pump raises the electrode through a diode
// high-side switch, while the other side sinks the programmed current
// through its high-voltage adapter (HVA) into the shared sinking IDAC.
// Reversing the current swaps the roles. At rest both HVAs are grounded so
// the tissue is biased at ground. The charge pump of the sourcing side runs
// only while the supply-enable comparator reports that the IDAC is close to
// dropping out of regulation (`dropout`), so the pump delivers just the
// voltage the load needs. A pump that is not in use is discharged, which
// reverse-biases its diode and turns that high-side switch off.
//
// Every change of drive state passes through GAP, DEAD_CYCLES cycles with
// every low-side switch open and both pumps off and discharging
// (break-before-make), so the two sides are never connected at once.
//
// Interface and timing: `sample` is the requested polarity and IDAC code.
// State and idac_code are registered and the switch controls are decoded
// from the state; the pump enable is combinational from `dropout` so the
// comparator loop is not slowed by a clock. idac_code is zero unless a side is sourcing. bb_event pulses when
// a GAP interval starts.
//
// From the chip: the H-bridge with one shared sinking IDAC, charge pumps
// enabled by the dropout comparator, diode switches turned off by
// discharging the pumps, ground rest state, break-before-make sequencing.
// Choices of this design: the state encoding, the gap length and keeping
// the idle pumps discharging.
module hbridge_ctrl
  import bbci_pkg::*;
#(
  parameter int unsigned DEAD_CYCLES = 2,
  localparam int unsigned DC_W       = $clog2(DEAD_CYCLES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  stim_sample_t       sample,
  input  logic               dropout,
  output hb_ctrl_t           ctrl,
  output logic [IDAC_W-1:0]  idac_code,
  output hb_state_e          state,
  output logic               bb_event
);

  hb_state_e target;
  always_comb begin
    if (sample.mag == '0) target = HB_IDLE;
    else if (sample.neg)  target = HB_R_SRC;
    else                  target = HB_A_SRC;
  end

  logic [DC_W-1:0] gap_cnt;
  hb_ctrl_t        sw;   // switch controls decoded from the state

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= HB_IDLE;
      gap_cnt   <= '0;
      idac_code <= '0;
      bb_event  <= 1'b0;
    end else begin
      bb_event <= 1'b0;
      unique case (state)
        HB_GAP: begin
          if (gap_cnt == DC_W'(DEAD_CYCLES - 1)) state <= target;
          else                                   gap_cnt <= gap_cnt + 1'b1;
        end
        default: begin
          if (target != state) begin
            state    <= HB_GAP;
            gap_cnt  <= '0;
            bb_event <= 1'b1;
          end
        end
      endcase
      // current is only drawn once the new path is closed
      idac_code <= ((state == HB_A_SRC || state == HB_R_SRC) && target == state)
                   ? sample.mag : '0;
    end
  end

  always_comb begin
    sw = '0;
    unique case (state)
      HB_IDLE: begin
        sw.gnd_a = 1'b1;  sw.gnd_r = 1'b1;
        sw.discharge_a = 1'b1;  sw.discharge_r = 1'b1;
      end
      HB_A_SRC: begin
        sw.idac_r = 1'b1;
        sw.discharge_r = 1'b1;
        sw.pump_en_a = dropout;
      end
      HB_R_SRC: begin
        sw.idac_a = 1'b1;
        sw.discharge_a = 1'b1;
        sw.pump_en_r = dropout;
      end
      default: begin  // HB_GAP
        sw.discharge_a = 1'b1;  sw.discharge_r = 1'b1;
      end
    endcase
  end
  assign ctrl = sw;

  // Safety rules of the bridge.
  a_one_sink: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.idac_a && ctrl.idac_r)) else $error("both sides sinking");
  a_one_pump: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.pump_en_a && ctrl.pump_en_r)) else $error("both pumps on");
  a_gnd_sink: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.gnd_a && ctrl.idac_a) && !(ctrl.gnd_r && ctrl.idac_r))
    else $error("HVA grounded and sinking");
  a_pump_dis: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.pump_en_a && ctrl.discharge_a) && !(ctrl.pump_en_r && ctrl.discharge_r))
    else $error("pump charging and discharging");

endmodule
