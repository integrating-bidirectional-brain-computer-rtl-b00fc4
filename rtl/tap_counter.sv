// Triggered tap counter of one artifact canceller back-end.
//
// The canceller's filter input is a single impulse at the start of each
// stimulus pulse, so exactly one filter tap is active at any time: the tap
// number is simply the number of recording frames since the pulse. This
// counter produces that number. A trigger arms it; at the next frame
// boundary (frame_end) the tap number becomes 0 and the window is active,
// and every later frame boundary advances it by one. After NUM_TAPS frames
// the window closes. A trigger during an open window restarts it at tap 0
// on the next frame boundary. A trigger that coincides with frame_end opens
// the window at once, which is how the stimulator controller aligns its
// pulses with the recording frames.
//
// Interface and timing: tap and active are registered and change only on
// the clock edge ending a frame, so they are constant for every slot of a
// frame; the update hardware therefore visits every sense channel at one
// tap before moving to the next tap.
//
// The triggered counter and the 32-tap window follow the chip; arming on
// the next frame boundary and restart on re-trigger are choices of this
// design.
module tap_counter #(
  parameter int unsigned NUM_TAPS = 32,
  localparam int unsigned TAP_AW  = $clog2(NUM_TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trigger,
  input  logic              frame_end,
  output logic [TAP_AW-1:0] tap,
  output logic              active
);

  localparam logic [TAP_AW-1:0] TAP_LAST = TAP_AW'(NUM_TAPS - 1);

  logic armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed  <= 1'b0;
      tap    <= '0;
      active <= 1'b0;
    end else if (frame_end) begin
      if (armed || trigger) begin
        armed  <= 1'b0;
        tap    <= '0;
        active <= 1'b1;
      end else if (active) begin
        if (tap == TAP_LAST) active <= 1'b0;
        else                 tap    <= tap + 1'b1;
      end
    end else if (trigger) begin
      armed <= 1'b1;
    end
  end

endmodule
