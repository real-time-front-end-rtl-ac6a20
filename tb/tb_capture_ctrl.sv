// Testbench of capture_ctrl: arm holds the FIFO reset for 16 clocks; a
// trigger then moves exactly burst_frames frame sets, only while frames are
// ready and the buffer has room; done rises after the last one; a trigger
// during a burst is ignored; a zero-length burst ends at once.
`timescale 1ns/1ps
module tb_capture_ctrl;
  logic clk = 0, rst = 1, arm = 0, trigger = 0, frames_ready = 0, cap_full = 0;
  logic [13:0] burst_frames = '0;
  logic fifo_rst, capturing, cap_we, done;
  int checks = 0, failures = 0;

  capture_ctrl #(.ARM_RST_CYCLES(16), .LEN_W(14)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int moved = 0;
  always @(posedge clk) if (cap_we) moved++;

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #0.5 s = 0;
  endtask

  task automatic burst(int n);
    int cyc = 0;
    moved = 0;
    burst_frames = 14'(n);
    pulse(trigger);
    while (!done && cyc < 5000) begin
      frames_ready = ($urandom % 3) != 0;
      cap_full     = ($urandom % 7) == 0;
      if (cyc == 5 && capturing) trigger = 1;   // ignored: burst running
      if (cyc == 6) trigger = 0;
      @(posedge clk); #0.5;
      checks++;
      if (cap_we && !(frames_ready && !cap_full)) begin failures++; $display("write without ready/room"); end
      cyc++;
    end
    trigger = 0; frames_ready = 1; cap_full = 0;
    repeat (5) @(posedge clk);
    #0.5;
    checks++;
    if (moved != n) begin failures++; $display("burst %0d moved %0d", n, moved); end
    checks++;
    if (capturing || !done) begin failures++; $display("burst %0d: capturing %b done %b", n, capturing, done); end
  endtask

  initial begin
    int len;
    repeat (2) @(posedge clk);
    #0.5 rst = 0;
    repeat (20) @(posedge clk);
    #0.5;
    // arm
    pulse(arm);
    len = 0;
    while (fifo_rst) begin @(posedge clk); #0.5; len++; end
    checks++;
    if (len != 16) begin failures++; $display("fifo_rst lasted %0d more clocks after arm", len); end
    burst(37);
    burst(1);
    burst(200);
    burst(0);
    // re-arm clears done
    pulse(arm);
    checks++;
    if (done || !fifo_rst) begin failures++; $display("arm did not clear done / reset FIFOs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
