// End-to-end testbench of frontend_top at reduced sizes (16 clocks per
// serial bit, 64-entry capture buffer, one-sample delay on channels 2 and 3).
//
// An ADC model drives every channel over its 7 DDR lanes with the sample
// value (n << 3) | ch, n being the sample index shared by all channels, so
// any skew between channels is visible in the captured data.  The test:
//   1. steps the input-delay tap of channel 0 past its wrap point;
//   2. sends coefficient sets for filters 5 and 6 (two different chips, so
//      two instruction FIFOs and reload machines) over the serial line, plus
//      one instruction for a filter that does not exist;
//   3. arms and captures a burst of ADC data, and checks every word: the
//      channel order of the host format, one common sample index per frame
//      (one less on the delayed channels), consecutive samples, and the
//      filtered ramp on channels 5 and 6 against a reference FIR;
//   4. switches to the unit-pulse source, re-arms, captures again and checks
//      that channels 5 and 6 repeat their loaded coefficients every 32
//      samples and the others a single 1 (pass-through reset set);
//   5. checks the burst takes one ADC clock per sample.
// Each mechanism is counted and must have happened at least once.
`timescale 1ns/1ps
module tb_frontend_top;
  localparam int N_CH = 8, NT = 10, CLK_HZ = 1_600_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;
  localparam int CAP_LOG2 = 6;
  localparam logic [7:0] CH_DELAY = 8'b0000_1100;
  localparam int BURST = 24;          // frames per burst

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

  frontend_top #(
    .CLK_HZ(CLK_HZ), .BAUD(BAUD), .CH_DELAY(CH_DELAY), .CAP_LOG2(CAP_LOG2), .F64_LOG2(5)
  ) dut (.*);

  always #2.5 sys_clk = ~sys_clk;                    // 200 MHz
  always #2   adc_clk = ~adc_clk;                    // four in-phase 250 MHz chip clocks

  initial begin
    #3_000_000;
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
  logic [15:0] words [BURST][N_CH][4];
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

  // filters 5 (chip 2) and 6 (chip 3) get new sets; the others keep the reset set
  logic [15:0] h [N_CH][NT];
  logic [15:0] fir_coef [N_CH][NT];               // active sets inside the filters
  for (genvar ch = 0; ch < N_CH; ch++) begin : g_coef
    for (genvar k = 0; k < NT; k++) begin : g_k
      assign fir_coef[ch][k] = dut.g_ch[ch].u_fir.coef[k];
    end
  end
  function automatic bit reloaded(int ch);
    return ch == 5 || ch == 6;
  endfunction

  initial begin
    repeat (5) @(posedge sys_clk);
    #0.5 sys_rst = 0;

    // 1. input-delay taps
    for (int i = 0; i < 17; i++) begin
      dly_inc[0] = 1; @(posedge sys_clk); #0.5 dly_inc[0] = 0;
      if (dly_tap[0] == 5'd0) m_wrap++;
    end
    checks++;
    if (dly_tap[0] != 5'd1 || dly_tap[1] != 5'd16) begin failures++; $display("taps %0d %0d", dly_tap[0], dly_tap[1]); end

    // 2. coefficients of filters 5 and 6, each sent last coefficient first
    for (int ch = 0; ch < N_CH; ch++)
      for (int k = 0; k < NT; k++) h[ch][k] = (k == 0) ? 16'd1 : 16'd0;
    for (int k = 0; k < NT; k++) begin
      h[5][k] = 16'($signed(k * 37 - 150));
      h[6][k] = 16'($signed(200 - k * k * 5));
    end
    send_instr(16'd9, 16'h1234);                 // no such filter
    for (int k = NT - 1; k >= 0; k--) send_instr(16'd5, h[5][k]);
    for (int k = NT - 1; k >= 0; k--) send_instr(16'd6, h[6][k]);
    repeat (200) @(posedge sys_clk);
    checks++;
    if (m_config != 1) begin failures++; $display("filter 5 configured %0d times", m_config); end
    checks++;
    if (!instr_dropped) begin failures++; $display("bad filter number not flagged"); end
    for (int ch = 0; ch < N_CH; ch++)
      for (int k = 0; k < NT; k++) begin
        checks++;
        if (fir_coef[ch][k] !== h[ch][k]) begin
          failures++; $display("filter %0d coef %0d = %h expected %h", ch, k, fir_coef[ch][k], h[ch][k]);
        end
      end

    // 3. ADC data burst: the filters other than 5 and 6 pass their input
    capture();
    checks++;
    if (burst_cycles > 4 * BURST + 60) begin failures++; $display("burst took %0d ADC clocks for %0d samples", burst_cycles, 4 * BURST); end
    begin
      int n0;
      n0 = words[0][0][0] >> 3;
      for (int e = 0; e < BURST; e++)
        for (int ch = 0; ch < N_CH; ch++) begin
          if (reloaded(ch)) continue;
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
      // channels 5 and 6: filtered ramp, y[n] = sum h[k] x[n-k]
      for (int ch = 5; ch <= 6; ch++)
        for (int e = 1; e < BURST; e++)
          for (int s = 0; s < 4; s++) begin
            longint acc;
            acc = 0;
            for (int k = 0; k < NT; k++)
              acc += longint'($signed(h[ch][k])) * longint'(adc_val(ch, (n0 + 4 * e + s - k - int'(CH_DELAY[ch])) & 1023));
            if (acc > 32767) acc = 32767;
            if (acc < -32768) acc = -32768;
            checks++;
            if (words[e][ch][s] !== 16'(acc)) begin
              failures++; $display("ch%0d entry %0d sample %0d: %0d expected %0d", ch, e, s, $signed(words[e][ch][s]), acc);
            end
          end
    end

    // 4. unit-pulse source
    test_mode = 1;
    capture();
    for (int ch = 0; ch < N_CH; ch++) begin
      int p;
      p = -1;
      for (int i = 0; i < 32; i++) if (words[i / 4][ch][i % 4] != 0 && p < 0) p = i;
      if (reloaded(ch)) begin
        // locate the response by its first two coefficients
        for (int i = 0; i < 32; i++) if (words[i / 4][ch][i % 4] == h[ch][0] && words[(i + 1) % 32 / 4][ch][(i + 1) % 4] == h[ch][1]) p = i;
      end
      checks++;
      if (p < 0) begin failures++; $display("ch %0d: no pulse", ch); continue; end
      for (int i = 0; i < 4 * BURST; i++) begin
        logic [15:0] e;
        int ph;
        ph = (i - p + 64) % 32;
        e = (ph < NT) ? h[ch][ph] : 16'd0;
        checks++;
        if (words[i / 4][ch][i % 4] !== e) begin failures++; $display("pulse ch %0d word %0d: %h expected %h", ch, i, words[i / 4][ch][i % 4], e); end
        else if (ph == 0) m_pulse++;
      end
    end

    // mechanisms
    checks++; if (m_stall  == 0) begin failures++; $display("no reload stall"); end
    checks++; if (m_instr  < 21) begin failures++; $display("%0d instructions", m_instr); end
    checks++; if (m_gate   < 2)  begin failures++; $display("write gate opened %0d times", m_gate); end
    checks++; if (m_rdstart < 2) begin failures++; $display("read start %0d times", m_rdstart); end
    checks++; if (m_arm    < 2)  begin failures++; $display("arm %0d times", m_arm); end
    checks++; if (m_done   < 2)  begin failures++; $display("burst done %0d times", m_done); end
    checks++; if (m_drop   == 0) begin failures++; $display("no dropped instruction"); end
    checks++; if (m_wrap   == 0) begin failures++; $display("tap never wrapped"); end
    checks++; if (m_pulse  == 0) begin failures++; $display("no test pulse seen"); end
    checks++; if (m_delay  == 0) begin failures++; $display("no delayed channel checked"); end
    $display("mechanisms: stall=%0d config=%0d instr=%0d gate=%0d rdstart=%0d arm=%0d done=%0d drop=%0d wrap=%0d pulse=%0d delay=%0d burst_cycles=%0d",
             m_stall, m_config, m_instr, m_gate, m_rdstart, m_arm, m_done, m_drop, m_wrap, m_pulse, m_delay, burst_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
