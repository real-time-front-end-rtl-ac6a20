// Testbench of fifo_wr_gate: after each (asynchronous) reset the write
// enable rises on the 32nd falling clock edge, not earlier, and stays high.
`timescale 1ns/1ps
module tb_fifo_wr_gate;
  logic clk = 0, rst = 1;
  logic wr_en;
  int checks = 0, failures = 0;

  fifo_wr_gate #(.EDGES(32)) dut (.clk, .rst, .wr_en);

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      int edges;
      edges = 0;
      rst = 1;
      #(7 + run);
      checks++;
      if (wr_en !== 1'b0) begin failures++; $display("wr_en high in reset"); end
      rst = 0;
      while (!wr_en && edges < 100) begin
        @(negedge clk); #0.1;
        edges++;
      end
      checks++;
      if (edges != 32) begin failures++; $display("run %0d: wr_en after %0d falling edges", run, edges); end
      repeat (20) @(negedge clk);
      checks++;
      if (wr_en !== 1'b1) begin failures++; $display("wr_en dropped"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
