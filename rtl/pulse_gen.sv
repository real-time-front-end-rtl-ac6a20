// Unit-pulse test source.
//
// Stands in for the ADC data when the filters are being checked: it emits a
// sample of value 1 once every PERIOD clocks and 0 otherwise, so each filter
// output must repeat its own coefficients every PERIOD clocks.  PERIOD = 32
// and the width follow the description; the pulse phase (first pulse on the
// first cycle after reset) is this design's choice.
module pulse_gen #(
  parameter int PERIOD = 32,
  parameter int W      = 14
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] pulse
);
  logic [$clog2(PERIOD)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)                                       cnt <= '0;
    else if (cnt == ($clog2(PERIOD))'(PERIOD - 1)) cnt <= '0;
    else                                           cnt <= cnt + 1'b1;
  end

  assign pulse = (cnt == '0 && !rst) ? W'(1) : '0;
endmodule
