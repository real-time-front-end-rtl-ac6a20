// Testbench of iodelay_tap_ctrl: the tap starts at 16 after reset, follows
// increment requests, wraps from 31 to 0 and holds without requests.
`timescale 1ns/1ps
module tb_iodelay_tap_ctrl;
  logic clk = 0, rst = 1, inc = 0;
  logic [4:0] tap;
  int checks = 0, failures = 0;
  int model;

  iodelay_tap_ctrl #(.TAPS(32), .INIT_TAP(16)) dut (.clk, .rst, .inc, .tap);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (tap !== 5'd16) begin failures++; $display("reset tap %0d", tap); end
    model = 16;
    for (int i = 0; i < 200; i++) begin
      inc = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (inc) begin
        model = (model + 1) % 32;
        if (model == 0) wraps++;
      end
      checks++;
      if (tap !== 5'(model)) begin failures++; $display("step %0d: tap %0d expected %0d", i, tap, model); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
