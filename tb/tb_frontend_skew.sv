// Alignment testbench of frontend_top with skewed ADC chip clocks.
//
// On the board the four chip clocks share one frequency but not one phase.
// Here they run at 250 MHz with phases 0, 0.9, 2.3 and 3.4 ns, and each
// chip's ADC model drives its lanes from its own clock.  All chips sample
// the same analog instant on their k-th rising edge, so each channel carries
// (k << 3) | ch with k counted per chip from time zero.
//
// The test arms and captures several bursts, each armed at a different time
// relative to the clocks, and checks for every one:
//   - every channel's samples are consecutive through the whole burst
//     (no slip while the FIFOs run);
//   - each channel's sample index differs from channel 0's by at most one,
//     the residual that the per-channel one-sample delay is meant to remove;
//   - both channels of one chip have the same index;
//   - the burst takes about one ADC clock per sample.
// It prints the offsets seen.  Filters keep their reset (pass-through) set.
// Sizes are reduced: 64-entry capture buffer, bursts of 24 frames.
`timescale 1ns/1ps
module tb_frontend_skew;
  localparam int N_CH = 8;
  localparam int CAP_LOG2 = 6;
  localparam int BURST = 24;
  localparam int N_RUNS = 6;

  logic sys_clk = 0, sys_rst = 1;
  logic [3:0] adc_clk = '0;
  logic [N_CH-1:0][6:0] adc_ddr = '0;
  logic [N_CH-1:0] dly_inc = '0;
  logic [N_CH-1:0][4:0] dly_tap;
  logic test_mode = 0, uart_rx = 1, arm = 0, trigger = 0, cap_re = 0;
  logic [13:0] burst_frames = 14'(BURST);
  logic [15:0] cap_dout;
  logic cap_empty, capturing, burst_done, instr_dropped;
  logic [CAP_LOG2:0] cap_level;

  int checks = 0, failures = 0;

  frontend_top #(.CAP_LOG2(CAP_LOG2), .F64_LOG2(5)) dut (.*);

  always #2.5 sys_clk = ~sys_clk;                    // 200 MHz

  // chip clocks: 4 ns period, each with its own phase
  localparam realtime PHASE [4] = '{0.0, 0.9, 2.3, 3.4};
  for (genvar c = 0; c < 4; c++) begin : g_clk
    initial begin
      #(PHASE[c]);
      forever begin
        adc_clk[c] = 1; #2;
        adc_clk[c] = 0; #2;
      end
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ ADC model
  function automatic logic [13:0] adc_val(int ch, int n);
    return 14'(((n & 1023) << 3) | ch);
  endfunction

  int n_adc [4] = '{0, 0, 0, 0};
  for (genvar c = 0; c < 4; c++) begin : g_adc
    // even bits are set up for the rising edge, odd bits for the falling edge
    always @(negedge adc_clk[c]) begin
      #0.5;
      for (int j = 0; j < 2; j++)
        for (int k = 0; k < 7; k++) adc_ddr[2*c+j][k] = adc_val(2*c+j, n_adc[c])[2*k];
    end
    always @(posedge adc_clk[c]) begin
      #0.5;
      for (int j = 0; j < 2; j++)
        for (int k = 0; k < 7; k++) adc_ddr[2*c+j][k] = adc_val(2*c+j, n_adc[c])[2*k+1];
      n_adc[c]++;
    end
  end

  // ------------------------------------------------------------- helpers
  task automatic sys_pulse(ref logic s);
    @(posedge sys_clk); #0.5 s = 1;
    @(posedge sys_clk); #0.5 s = 0;
  endtask

  logic [15:0] words [BURST][N_CH][4];
  int burst_cycles;
  task automatic capture(int wait_ps);
    int t0;
    #(wait_ps * 1ps);
    sys_pulse(arm);
    repeat (200) @(posedge sys_clk);
    t0 = n_adc[0];
    sys_pulse(trigger);
    wait (burst_done);
    burst_cycles = n_adc[0] - t0;
    repeat (4) @(posedge sys_clk);
    for (int e = 0; e < BURST; e++)
      for (int ch = 0; ch < N_CH; ch++)
        for (int s = 0; s < 4; s++) begin
          #0.5;
          checks++;
          if (cap_empty) begin failures++; $display("capture buffer ran empty"); end
          words[e][ch][s] = cap_dout;
          cap_re = 1;
          @(posedge sys_clk);
          #0.5 cap_re = 0;
        end
  endtask

  int n_zero = 0, n_one = 0;

  initial begin
    repeat (5) @(posedge sys_clk);
    #0.5 sys_rst = 0;
    repeat (50) @(posedge sys_clk);

    for (int r = 0; r < N_RUNS; r++) begin
      int idx0;
      int off [N_CH];
      capture(r * 1300 + 700);
      checks++;
      if (burst_cycles > 4 * BURST + 60) begin failures++; $display("run %0d: burst took %0d ADC clocks", r, burst_cycles); end
      idx0 = words[0][0][0] >> 3;
      for (int ch = 0; ch < N_CH; ch++) begin
        int first;
        first = words[0][ch][0] >> 3;
        checks++;
        if ((words[0][ch][0] & 16'h7) != 16'(ch)) begin failures++; $display("run %0d: channel order, word %h at ch %0d", r, words[0][ch][0], ch); end
        // offset from channel 0, modulo the 1024-sample ramp
        off[ch] = ((first - idx0 + 512) & 1023) - 512;
        checks++;
        if (off[ch] < -1 || off[ch] > 1) begin failures++; $display("run %0d: ch %0d is %0d samples from ch 0", r, ch, off[ch]); end
        if (ch != 0) begin
          if (off[ch] == 0) n_zero++;
          else              n_one++;
        end
        for (int e = 0; e < BURST; e++)
          for (int s = 0; s < 4; s++) begin
            checks++;
            if (words[e][ch][s] !== 16'(adc_val(ch, (first + 4 * e + s) & 1023))) begin
              failures++;
              $display("run %0d: entry %0d ch %0d sample %0d: %h expected %h", r, e, ch, s, words[e][ch][s], adc_val(ch, (first + 4 * e + s) & 1023));
            end
          end
      end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (off[2*c] != off[2*c+1]) begin failures++; $display("run %0d: chip %0d channels differ", r, c); end
      end
      $display("run %0d: offsets from ch 0: %0d %0d %0d %0d %0d %0d %0d %0d", r,
               off[0], off[1], off[2], off[3], off[4], off[5], off[6], off[7]);
    end
    $display("channel offsets seen over %0d runs: 0 samples %0d times, 1 sample %0d times", N_RUNS, n_zero, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
