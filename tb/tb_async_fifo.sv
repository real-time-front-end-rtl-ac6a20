// Testbench of async_fifo: 250 MHz writer and 200 MHz reader with random
// write and read requests.  Every word read must be the next one written
// (scoreboard queue), `full` must appear and block writes, and `empty` must
// block reads.
`timescale 1ns/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic we = 0, re = 0, full, empty;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int fulls = 0, empties = 0;
  logic [15:0] q[$];

  async_fifo #(.WIDTH(16), .DEPTH_LOG2(4)) dut (.*);

  always #2   wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  int wphase = 0;
  always @(posedge wclk) begin
    if (!wrst) begin
      #0.2;
      // full only changes on wclk edges: decide now whether the next edge writes
      if (full) fulls++;
      we    = (wphase < 2000) ? (($urandom % 4) != 0) : (($urandom % 8) == 0);
      wdata = 16'($urandom);
      if (we && !full) q.push_back(wdata);
      wphase++;
    end
  end

  // reader
  int rcount = 0;
  always @(posedge rclk) begin
    if (!rrst) begin
      #0.2;
      // empty and rdata only change on rclk edges: check the word the next edge pops
      if (empty) empties++;
      re = (wphase < 1000) ? (($urandom % 4) == 0) : (($urandom % 3) != 0);
      if (re && !empty) begin
        logic [15:0] exp;
        checks++;
        if (q.size() == 0) begin failures++; $display("read from empty model"); end
        else begin
          exp = q.pop_front();
          if (rdata !== exp) begin failures++; $display("read %0d: got %h expected %h", rcount, rdata, exp); end
        end
        rcount++;
      end
    end
  end

  initial begin
    #23 wrst = 0; rrst = 0;
    #20000;
    checks++;
    if (fulls == 0) begin failures++; $display("full never seen"); end
    checks++;
    if (empties == 0) begin failures++; $display("empty never seen"); end
    checks++;
    if (rcount < 1000) begin failures++; $display("only %0d reads", rcount); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
