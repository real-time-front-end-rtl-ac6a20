// Full-size testbench of frontend_top: every parameter at its default
// (200 MHz system clock, 115200 baud serial line, 512 KB capture buffer).
//
// It loads a coefficient set into filter 5 over the serial line at the real
// bit rate, then arms and captures one burst that fills the capture buffer
// exactly (8192 frames, 32768 samples per channel), reads every word back
// and checks the channel order, the common sample index of all channels,
// the filtered channel against a reference FIR, and that the buffer reports
// full at the end of the burst.  The ADC model is the same ramp as in the
// reduced end-to-end test.
`timescale 1ns/1ps
module tb_frontend_full;
  localparam int N_CH = 8, NT = 10, CLK_HZ = 200_000_000, BAUD = 115_200, DIV = CLK_HZ / BAUD;
  localparam int CAP_LOG2 = 13;
  localparam logic [7:0] CH_DELAY = 8'h00;
  localparam int BURST = 8192;        // frames per burst: the whole buffer

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

  frontend_top dut (.*);

  always #2.5 sys_clk = ~sys_clk;                    // 200 MHz
  always #2   adc_clk = ~adc_clk;                    // four in-phase 250 MHz chip clocks

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ ADC model
  function automatic logic [13:0] adc_val(int ch, int n);
    return 14'(((n & 1023) << 3) | ch);
  endfunction
  int n_adc = 0;
  always @(negedge adc_clk[0]) begin
    #0.5;
    for (int ch = 0; ch < N_CH; ch++)
      for (int k = 0; k < 7; k++) adc_ddr[ch][k] = adc_val(ch, n_adc)[2*k];
  end
  always @(posedge adc_clk[0]) begin
    #0.5;
    for (int ch = 0; ch < N_CH; ch++)
      for (int k = 0; k < 7; k++) adc_ddr[ch][k] = adc_val(ch, n_adc)[2*k+1];
    n_adc++;
  end

  // -------------------------------------------------- mechanism counters
  int m_stall = 0, m_config = 0, m_instr = 0, m_gate = 0, m_rdstart = 0, m_arm = 0, m_done = 0;
  int m_drop = 0, m_wrap = 0, m_pulse = 0, m_delay = 0;
  logic prev_vld5 = 0, prev_gate = 0, prev_rd = 0, prev_done = 0, prev_drop = 0;
  always @(posedge adc_clk[2]) begin
    if (prev_vld5 && !dut.g_reload[2].u_reload.vld && dut.g_reload[2].u_reload.state == 1'b1) m_stall++;
    prev_vld5 = dut.g_reload[2].u_reload.vld;
    if (dut.cfg_tvalid[5]) m_config++;
  end
  always @(posedge sys_clk) begin
    if (dut.instr_valid) m_instr++;
    if (dut.fifo_rst_sys && !dut.u_ctrl.fifo_rst) ;
    if (arm) m_arm++;
    if (burst_done && !prev_done) m_done++;
    if (instr_dropped && !prev_drop) m_drop++;
    prev_done = burst_done; prev_drop = instr_dropped;
  end
  always @(posedge adc_clk[0]) begin
    if (dut.wr_gate[0] && !prev_gate) m_gate++;
    if (dut.rd_started && !prev_rd) m_rdstart++;
    prev_gate = dut.wr_gate[0]; prev_rd = dut.rd_started;
  end

  // ------------------------------------------------------------- helpers
  task automatic uart_byte(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (DIV) @(posedge sys_clk);
    end
    uart_rx = 1;
    repeat (DIV) @(posedge sys_clk);
  endtask

  task automatic send_instr(logic [15:0] filt, logic [15:0] coef);
    logic [31:0] w;
    w = {filt, coef};
    for (int b = 3; b >= 0; b--) uart_byte(w[8*b +: 8]);
  endtask

  task automatic sys_pulse(ref logic s);
    @(posedge sys_clk); #0.5 s = 1;
    @(posedge sys_clk); #0.5 s = 0;
  endtask

  // capture one burst; returns words[entry][ch][sample] and ADC cycles used
  logic [15:0] words [BURST][N_CH][4];   // 512 KB of read-back data
  int burst_cycles;
  task automatic capture();
    int t0;
    sys_pulse(arm);
    repeat (200) @(posedge sys_clk);
    t0 = n_adc;
    sys_pulse(trigger);
    wait (burst_done);
    burst_cycles = n_adc - t0;
    repeat (4) @(posedge sys_clk);
    checks++;
    if (!dut.cap_full) begin failures++; $display("buffer not full after a buffer-sized burst"); end
    checks++;
    if (cap_level != (CAP_LOG2+1)'(BURST)) begin failures++; $display("capture level %0d, expected %0d", cap_level, BURST); end
    for (int e = 0; e < BURST; e++)
      for (int ch = 0; ch < N_CH; ch++)
        for (int s = 0; s < 4; s++) begin
          #0.5;
          if (cap_empty) begin failures++; $display("capture buffer ran empty"); end
          words[e][ch][s] = cap_dout;
          cap_re = 1;
          @(posedge sys_clk);
          #0.5 cap_re = 0;
        end
    checks++;
    if (!cap_empty) begin failures++; $display("capture buffer not empty after the burst"); end
  endtask

  logic [15:0] h [NT];

  initial begin
    repeat (5) @(posedge sys_clk);
    #0.5 sys_rst = 0;

    // 2. coefficients of filter 5, sent last coefficient first
    for (int k = 0; k < NT; k++) h[k] = 16'($signed(k * 37 - 150));
    for (int k = NT - 1; k >= 0; k--) send_instr(16'd5, h[k]);
    repeat (200) @(posedge sys_clk);
    checks++;
    if (m_config != 1) begin failures++; $display("filter 5 configured %0d times", m_config); end
    checks++;
    if (instr_dropped) begin failures++; $display("instruction lost"); end
    for (int k = 0; k < NT; k++) begin
      checks++;
      if (dut.g_ch[5].u_fir.coef[k] !== h[k]) begin failures++; $display("coef %0d = %h expected %h", k, dut.g_ch[5].u_fir.coef[k], h[k]); end
    end

    // 3. ADC data burst (filters other than 5 pass their input)
    //    channel 5 is filtered, so only the other channels carry the ramp
    capture();
    checks++;
    if (burst_cycles > 4 * BURST + 60) begin failures++; $display("burst took %0d ADC clocks for %0d samples", burst_cycles, 4 * BURST); end
    begin
      int n0;
      n0 = words[0][0][0] >> 3;
      for (int e = 0; e < BURST; e++)
        for (int ch = 0; ch < N_CH; ch++) begin
          if (ch == 5) continue;
          for (int s = 0; s < 4; s++) begin
            int n;
            n = (n0 + 4 * e + s - int'(CH_DELAY[ch])) & 1023;
            checks++;
            if (words[e][ch][s] !== 16'(adc_val(ch, n))) begin
              failures++;
              $display("entry %0d ch %0d sample %0d: %h expected %h", e, ch, s, words[e][ch][s], adc_val(ch, n));
            end else if (CH_DELAY[ch]) m_delay++;
          end
        end
      // channel 5: filtered ramp, y[n] = sum h[k] x[n-k]
      for (int e = 1; e < BURST; e++)
        for (int s = 0; s < 4; s++) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < NT; k++) acc += longint'($signed(h[k])) * longint'(adc_val(5, (n0 + 4 * e + s - k) & 1023));
          if (acc > 32767) acc = 32767;
          if (acc < -32768) acc = -32768;
          checks++;
          if (words[e][5][s] !== 16'(acc)) begin failures++; $display("ch5 entry %0d sample %0d: %0d expected %0d", e, s, $signed(words[e][5][s]), acc); end
        end
    end

    $display("full-size: instr=%0d config=%0d stall=%0d burst_cycles=%0d", m_instr, m_config, m_stall, burst_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
