// DDR-to-SDR capture of one ADC channel.
//
// The ADC sends each 14-bit two's-complement sample over 7 lanes at double
// data rate: 7 bits with the rising edge of the ADC clock and the other 7 with
// the following falling edge (as described for the ADS62P49 interface).  This
// block registers the lanes on both edges and assembles the sample on the next
// rising edge, like an input DDR register in "same edge" mode.
//
// Bit placement is this design's choice, as the description does not give it:
// lane k carries sample bit 2k on the rising edge and bit 2k+1 on the falling
// edge.
//
// Timing: the sample whose rising half is presented at rising edge t appears
// on `sample` after rising edge t+1 (one cycle of latency).
module adc_ddr_capture #(
  parameter int LANE_W = 7
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [LANE_W-1:0]     ddr_in,
  output logic [2*LANE_W-1:0]   sample
);
  logic [LANE_W-1:0] rise_q, fall_q;

  always_ff @(posedge clk) begin
    if (rst) rise_q <= '0;
    else     rise_q <= ddr_in;
  end

  always_ff @(negedge clk) begin
    if (rst) fall_q <= '0;
    else     fall_q <= ddr_in;
  end

  // Interleave: even bits from the rising edge, odd bits from the falling edge.
  logic [2*LANE_W-1:0] word;
  always_comb begin
    for (int k = 0; k < LANE_W; k++) begin
      word[2*k]   = rise_q[k];
      word[2*k+1] = fall_q[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sample <= '0;
    else     sample <= word;
  end
endmodule
