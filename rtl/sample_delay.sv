// Build-time one-sample delay of a channel.
//
// After the clock tree is synchronised some ADC clocks still arrive a fraction
// of a period late, which shows up as one sample of skew between channels; a
// register on the early channels realigns them.  DELAY is 0 (wire) or 1 (one
// register) and is chosen per channel at build time, as the needed value
// depends on the ADC clock frequency.  The skew never exceeds one sample, so
// larger values are rejected.
module sample_delay #(
  parameter int DELAY = 1,
  parameter int W     = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DELAY == 0) begin : g_wire
    assign q = d;
  end else if (DELAY == 1) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) q <= '0;
      else     q <= d;
    end
  end else begin : g_bad
    $error("sample_delay: DELAY must be 0 or 1");
  end
endmodule
