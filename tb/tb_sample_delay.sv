// Testbench of sample_delay with DELAY = 1: the output is the input of the
// previous clock.
`timescale 1ns/1ps
module tb_sample_delay;
  logic clk = 0, rst = 1;
  logic [15:0] d = '0, q;
  int checks = 0, failures = 0;

  sample_delay #(.DELAY(1), .W(16)) dut (.clk, .rst, .d, .q);

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prev;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    prev = d;
    for (int i = 0; i < 300; i++) begin
      d = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if (q !== d) begin failures++; $display("step %0d: q %h expected %h", i, q, d); end
      prev = d;
      d = 16'($urandom);
      #0.5;
      checks++;
      if (q !== prev) begin failures++; $display("step %0d: q changed before the clock", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
