// 16-bit in, 64-bit out dual-clock FIFO of one channel.
//
// Samples written on the ADC side (clock of the first ADC chip) are gathered
// four at a time into a 64-bit frame, first sample in bits 15:0 (little-endian
// order), and the frame crosses to the system clock through a dual-clock FIFO
// of 2**DEPTH_LOG2 frames.  The frame width and sample count follow the
// description; the sample order inside a frame and the depth are this
// design's choices.  A partly filled frame stays in the packer until its
// fourth sample arrives or the write side is reset.  A frame completed while
// the FIFO is full is lost.
//
// Timing: a frame is readable a few read clocks after its fourth sample
// (two-flop pointer synchronisation).
module fifo_16to64 #(
  parameter int DEPTH_LOG2 = 9
) (
  input  logic        wclk,
  input  logic        wrst,
  input  logic        we,
  input  logic [15:0] din,
  output logic        full,
  input  logic        rclk,
  input  logic        rrst,
  input  logic        re,
  output logic [63:0] dout,
  output logic        empty
);
  logic [47:0] hold;       // first three samples of the frame being built
  logic [1:0]  slot;       // position of the next sample in the frame
  logic        push;
  logic [63:0] frame;

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      slot <= '0;
      hold <= '0;
    end else if (we) begin
      slot <= slot + 1'b1;
      case (slot)
        2'd0: hold[15:0]  <= din;
        2'd1: hold[31:16] <= din;
        2'd2: hold[47:32] <= din;
        default: ;
      endcase
    end
  end

  assign push  = we && (slot == 2'd3);
  assign frame = {din, hold};

  async_fifo #(.WIDTH(64), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .wclk, .wrst, .we(push), .wdata(frame), .full,
    .rclk, .rrst, .re, .rdata(dout), .empty
  );
endmodule
