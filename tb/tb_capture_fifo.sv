// Testbench of capture_fifo (reduced depth): random frame sets are written
// for all eight channels; the reader must get, per entry, channel 1 samples
// 1-4, channel 2 samples 1-4, ... channel 8.  Also checks `level`, that a
// full buffer refuses writes and that an empty one refuses reads.
`timescale 1ns/1ps
module tb_capture_fifo;
  localparam int N_CH = 8, DL = 4;
  logic clk = 0, rst = 1;
  logic we = 0, re = 0, full, empty;
  logic [N_CH-1:0][63:0] din = '0;
  logic [15:0] dout;
  logic [DL:0] level;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  capture_fifo #(.N_CH(N_CH), .DEPTH_LOG2(DL)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_set();
    for (int c = 0; c < N_CH; c++) din[c] = {$urandom, $urandom};
    we = 1;
    @(posedge clk);
    if (!full) for (int c = 0; c < N_CH; c++) for (int s = 0; s < 4; s++) q.push_back(din[c][16*s +: 16]);
    #0.5 we = 0;
  endtask

  task automatic read_word();
    checks++;
    if (empty) begin failures++; $display("unexpected empty"); end
    else if (dout !== q[0]) begin failures++; $display("got %h expected %h", dout, q[0]); end
    re = 1;
    @(posedge clk);
    void'(q.pop_front());
    #0.5 re = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #0.5 rst = 0;
    checks++;
    if (!empty || level != 0) begin failures++; $display("not empty after reset"); end
    // fill completely, one more write must be refused
    for (int i = 0; i < (1 << DL); i++) write_set();
    checks++;
    if (!full || level != (1 << DL)) begin failures++; $display("not full: level %0d", level); end
    write_set();
    checks++;
    if (q.size() != (1 << DL) * N_CH * 4) begin failures++; $display("write accepted while full"); end
    // drain half, then mix writes and reads
    for (int i = 0; i < (1 << DL) * N_CH * 2; i++) read_word();
    checks++;
    if (level != (1 << DL) / 2) begin failures++; $display("level %0d after half drain", level); end
    for (int k = 0; k < 200; k++) begin
      if (($urandom % 16) == 0 && !full) write_set();
      else if (!empty) read_word();
    end
    while (!empty) read_word();
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words never read", q.size()); end
    re = 1; @(posedge clk); #0.5 re = 0;   // read while empty is ignored
    checks++;
    if (!empty || level != 0) begin failures++; $display("read from empty changed state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
