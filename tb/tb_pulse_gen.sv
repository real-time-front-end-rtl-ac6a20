// Testbench of pulse_gen: the output is 1 exactly once every 32 clocks and
// 0 otherwise, starting on the first clock after reset.
`timescale 1ns/1ps
module tb_pulse_gen;
  logic clk = 0, rst = 1;
  logic [13:0] pulse;
  int checks = 0, failures = 0;

  pulse_gen #(.PERIOD(32), .W(14)) dut (.clk, .rst, .pulse);

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #0.5;
    for (int n = 0; n < 32 * 20; n++) begin
      checks++;
      if (pulse !== ((n % 32 == 0) ? 14'd1 : 14'd0)) begin
        failures++;
        $display("cycle %0d: pulse %0d", n, pulse);
      end
      if (pulse == 14'd1) ones++;
      @(posedge clk); #1;
    end
    checks++;
    if (ones != 20) begin failures++; $display("%0d pulses, expected 20", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
