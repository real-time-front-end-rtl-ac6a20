// Two-flop synchroniser for a slowly changing level (for example the burst
// flag moving from the system clock to the ADC clock).  Output lags the input
// by two destination clock edges.
module sync_bit (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic s1;
  always_ff @(posedge clk) begin
    if (rst) {q, s1} <= 2'b00;
    else     {q, s1} <= {s1, d};
  end
endmodule
