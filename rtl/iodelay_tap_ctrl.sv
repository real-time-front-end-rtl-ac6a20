// Tap register of one channel's programmable input delay.
//
// Each ADC data bus reaches the FPGA over a different trace length, so every
// channel passes through a delay line of 32 steps (75 ps each at the clock
// used).  The setting starts at tap 16 after reset; software can only step it
// up, and a step from tap 31 wraps to 0.  This block holds that setting; the
// delay line itself is a pad resource outside the logic and takes `tap`.
//
// Timing: `tap` changes on the rising edge that samples `inc` high.
module iodelay_tap_ctrl #(
  parameter int TAPS     = 32,
  parameter int INIT_TAP = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     inc,
  output logic [$clog2(TAPS)-1:0]  tap
);
  always_ff @(posedge clk) begin
    if (rst)
      tap <= ($clog2(TAPS))'(INIT_TAP);
    else if (inc)
      tap <= (tap == ($clog2(TAPS))'(TAPS - 1)) ? '0 : tap + 1'b1;
  end
endmodule
