// Testbench of uart_rx at a reduced clock-to-baud ratio (16 clocks per bit):
// random bytes are sent 8N1 with random idle gaps and must be received in
// order; a frame with a low stop bit must be dropped; the byte must be
// reported within the stop bit.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int CLK_HZ = 1_600_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data_out;
  logic data_out_ready;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  int got = 0;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (data_out_ready) begin
    checks++;
    got++;
    if (q.size() == 0) begin failures++; $display("unexpected byte %h", data_out); end
    else begin
      logic [7:0] e;
      e = q.pop_front();
      if (data_out !== e) begin failures++; $display("got %h expected %h", data_out, e); end
    end
  end

  task automatic send(logic [7:0] b, logic stop = 1);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (DIV) @(posedge clk);
    end
    rx = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (40) @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (i == 30) begin
        send(8'h5A, 1'b0);   // framing error: dropped
        repeat (3 * DIV) @(posedge clk);
      end
      q.push_back(b);
      send(b);
      repeat ($urandom % (2 * DIV)) @(posedge clk);
    end
    repeat (2 * DIV) @(posedge clk);
    checks++;
    if (got != 60 || q.size() != 0) begin failures++; $display("received %0d of 60", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
