// Testbench of fifo_16to64: writes a counting-pattern sample stream on a
// 250 MHz clock with gaps, reads frames on a 200 MHz clock and checks that
// each frame holds four consecutive samples, first sample in bits 15:0.
`timescale 1ns/1ps
module tb_fifo_16to64;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic we = 0, re = 0, full, empty;
  logic [15:0] din = 16'h1000;
  logic [63:0] dout;
  int checks = 0, failures = 0;
  int nframes = 0;
  logic [15:0] next_exp = 16'h1000;

  fifo_16to64 #(.DEPTH_LOG2(3)) dut (.*);

  always #2   wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] cnt = 16'h1000;
  always @(posedge wclk) begin
    if (!wrst) begin
      if (we) cnt = cnt + 1'b1;
      #0.2;
      // never write past full
      we  <= !full && (($urandom % 5) != 0);
      din <= cnt;
    end
  end

  always @(posedge rclk) begin
    if (!rrst) begin
      #0.2;
      re = (($urandom % 3) == 0);
      if (re && !empty) begin
        for (int s = 0; s < 4; s++) begin
          checks++;
          if (dout[16*s +: 16] !== next_exp) begin
            failures++;
            $display("frame %0d sample %0d: got %h expected %h", nframes, s, dout[16*s +: 16], next_exp);
          end
          next_exp++;
        end
        nframes++;
      end
    end
  end

  initial begin
    #23 wrst = 0; rrst = 0;
    #30000;
    checks++;
    if (nframes < 200) begin failures++; $display("only %0d frames", nframes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
