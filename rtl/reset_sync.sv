// Reset synchroniser: asynchronous assertion, release two clock edges after
// the asynchronous request drops, so every flop of the receiving clock domain
// leaves reset on the same edge.  Used wherever a reset or the arm request
// crosses into an ADC clock domain.
module reset_sync (
  input  logic clk,
  input  logic arst,      // asynchronous, active high
  output logic rst        // active high, released synchronously
);
  logic [1:0] q;
  always_ff @(posedge clk or posedge arst) begin
    if (arst) q <= 2'b11;
    else      q <= {q[0], 1'b0};
  end
  assign rst = q[1];
endmodule
