// Testbench of read_fsm: random 32-bit instructions are fed as four bytes,
// most significant first, with random gaps; each must be presented once,
// whole, with a one-clock instr_valid.
`timescale 1ns/1ps
module tb_read_fsm;
  logic clk = 0, rst = 1, byte_valid = 0;
  logic [7:0] byte_in = '0;
  fe_pkg::instr_t instr;
  logic instr_valid;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  int got = 0;

  read_fsm dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (instr_valid) begin
    checks++;
    got++;
    if (q.size() == 0) begin failures++; $display("unexpected instruction"); end
    else begin
      logic [31:0] e;
      e = q.pop_front();
      if (instr !== e) begin failures++; $display("got %h expected %h", instr, e); end
      else if (instr.filter !== e[31:16] || instr.coef !== e[15:0]) begin failures++; $display("field split wrong"); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #0.5 rst = 0;
    for (int i = 0; i < 100; i++) begin
      logic [31:0] w;
      w = $urandom;
      q.push_back(w);
      for (int b = 3; b >= 0; b--) begin
        repeat (2 + $urandom % 6) @(posedge clk);
        #0.5 byte_in = w[8*b +: 8]; byte_valid = 1;
        @(posedge clk);
        #0.5 byte_valid = 0; byte_in = 8'($urandom);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != 100) begin failures++; $display("got %0d of 100", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
