// Start-up gate of the input FIFO write enable.
//
// Just after the clock tree restarts, the ADC clocks run irregularly.  The
// write enable of the input FIFOs of one ADC chip is therefore held low after
// reset and raised only after EDGES falling edges of that chip's clock.  The
// reset here is the arm request (asynchronous), so re-arming once the clocks
// are stable restarts the count in every chip domain together.
//
// Timing: wr_en rises on the EDGES-th falling edge after reset is released.
module fifo_wr_gate #(
  parameter int EDGES = 32
) (
  input  logic clk,
  input  logic rst,     // asynchronous, active high
  output logic wr_en
);
  logic [$clog2(EDGES+1)-1:0] cnt;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      cnt   <= '0;
      wr_en <= 1'b0;
    end else if (!wr_en) begin
      cnt <= cnt + 1'b1;
      if (cnt == ($clog2(EDGES+1))'(EDGES - 1)) wr_en <= 1'b1;
    end
  end
endmodule
