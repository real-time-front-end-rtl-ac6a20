// Testbench of adc_ddr_capture: drives random 14-bit samples over the 7 DDR
// lanes (even bits with the rising edge, odd bits with the falling edge) and
// checks that each sample appears whole one clock after its rising half.
`timescale 1ns/1ps
module tb_adc_ddr_capture;
  logic clk = 0, rst = 1;
  logic [6:0]  ddr = '0;
  logic [13:0] sample;
  int checks = 0, failures = 0;

  adc_ddr_capture #(.LANE_W(7)) dut (.clk, .rst, .ddr_in(ddr), .sample);

  always #2 clk = ~clk;   // 250 MHz

  function automatic logic [6:0] rise_half(logic [13:0] s);
    for (int k = 0; k < 7; k++) rise_half[k] = s[2*k];
  endfunction
  function automatic logic [6:0] fall_half(logic [13:0] s);
    for (int k = 0; k < 7; k++) fall_half[k] = s[2*k+1];
  endfunction

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] cur, prev;
    repeat (3) @(posedge clk);
    #0.5 rst = 0;
    @(negedge clk); #0.5;
    cur = 14'($urandom);
    for (int i = 0; i < 400; i++) begin
      ddr = rise_half(cur);
      @(posedge clk); #0.5;
      ddr = fall_half(cur);
      if (i > 0) begin
        checks++;
        if (sample !== prev) begin
          failures++;
          $display("sample %0d: got %h expected %h", i - 1, sample, prev);
        end
      end
      @(negedge clk); #0.5;
      prev = cur;
      cur  = (i % 5 == 0) ? 14'h2AAA ^ 14'(i) : 14'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
