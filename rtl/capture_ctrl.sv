// Burst capture control (system clock).
//
// Host sequence: arm, then trigger.  `arm` resets the acquisition FIFOs by
// holding `fifo_rst` high for ARM_RST_CYCLES clocks; this is done once the ADC
// clocks are stable, so that all channels restart writing together.
// `trigger` then starts a burst: `capturing` goes high (it enables the ADC
// side of the 64-bit FIFOs) and every clock in which all channel FIFOs hold a
// frame and the capture buffer has room, `cap_we` moves one frame set into
// the buffer.  After `burst_frames` sets `capturing` drops and `done` stays
// high until the next arm or trigger.  A burst of 0 frames ends at once.
// Arm and trigger come from the host's register interface; the stretch
// length and the rule that a trigger during a burst or a reset is ignored
// are this design's choices.
module capture_ctrl #(
  parameter int ARM_RST_CYCLES = 16,
  parameter int LEN_W          = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             arm,
  input  logic             trigger,
  input  logic [LEN_W-1:0] burst_frames,
  input  logic             frames_ready,
  input  logic             cap_full,
  output logic             fifo_rst,
  output logic             capturing,
  output logic             cap_we,
  output logic             done
);
  logic [$clog2(ARM_RST_CYCLES+1)-1:0] rst_cnt;
  logic [LEN_W-1:0]                    left;

  assign fifo_rst = (rst_cnt != '0);
  assign cap_we   = capturing && frames_ready && !cap_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      rst_cnt   <= ($clog2(ARM_RST_CYCLES+1))'(ARM_RST_CYCLES);
      capturing <= 1'b0;
      done      <= 1'b0;
      left      <= '0;
    end else begin
      if (rst_cnt != '0) rst_cnt <= rst_cnt - 1'b1;

      if (arm) begin
        rst_cnt   <= ($clog2(ARM_RST_CYCLES+1))'(ARM_RST_CYCLES);
        capturing <= 1'b0;
        done      <= 1'b0;
      end else if (trigger && !capturing && !fifo_rst) begin
        done <= 1'b0;
        if (burst_frames == '0) begin
          done <= 1'b1;
        end else begin
          capturing <= 1'b1;
          left      <= burst_frames;
        end
      end else if (cap_we) begin
        left <= left - 1'b1;
        if (left == LEN_W'(1)) begin
          capturing <= 1'b0;
          done      <= 1'b1;
        end
      end
    end
  end
endmodule
