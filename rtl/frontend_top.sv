// Eight-channel acquisition front end of a cochlea-inspired hybrid-filter-bank
// receiver.
//
// An analog filter bank splits the RF input into eight adjacent sub-bands,
// each sampled by its own 14-bit ADC (four dual-channel chips, one clock per
// chip).  This module is the FPGA side: it captures all eight channels at the
// same time, runs a reloadable FIR filter on every channel (the digital
// synthesis/equalisation filters) and buffers phase-coherent bursts for the
// host.  Filter coefficients are sent over a serial line while data flows.
//
// Per channel ch (chip c = ch/2, clock adc_clk[c]):
//   adc_ddr -> adc_ddr_capture -> [pulse_gen if test_mode] -> fir_reload
//           -> sample_delay (CH_DELAY[ch]) -> async_fifo (adc_clk[c] -> adc_clk[0])
// In the adc_clk[0] domain all eight input FIFOs are read together, once
// every one holds data; each channel then packs four samples into a 64-bit
// frame (fifo_16to64) that crosses to sys_clk.  When all eight frames are
// present and a burst is running, capture_ctrl moves them into capture_fifo,
// which the host reads as 16-bit words: channel 1 x4, channel 2 x4, ...
//
// Reset and arm: sys_rst resets everything.  `arm` (sys_clk pulse) resets the
// acquisition FIFOs only, through per-domain reset synchronisers; the input
// FIFO write enable of each chip then waits WR_GATE_EDGES falling edges of
// that chip's clock.  `trigger` starts a burst of `burst_frames` frames.
// After an arm the channels of different chips may still differ by one
// sample, depending on where the reset release falls between the chip
// clocks' edges; CH_DELAY adds a one-sample delay to chosen channels.
//
// Coefficients: uart_rx -> read_fsm builds 32-bit instructions (filter in
// bits 31:16, coefficient in 15:0).  Each instruction goes to the
// instruction FIFO of the chip owning that filter (filter / 2), and that
// chip's reload_fsm streams the set into the filter, then applies it.
// Filter numbers of 8 and above are dropped and set `instr_dropped`.
//
// The data path, the 32-edge gate, the common read start, the 4-sample
// frames, the shared burst buffer, the serial protocol and the reload
// sequence follow the description.  The per-chip instruction FIFOs, the
// FIFO depths, the arm reset of all FIFO stages and the burst length port
// are this design's choices.  The pad delay lines are outside: their tap
// settings leave on `dly_tap`.
module frontend_top #(
  parameter int          N_CH            = fe_pkg::N_CH,
  parameter int          NTAPS           = fe_pkg::NTAPS,
  parameter int          CLK_HZ          = 200_000_000,
  parameter int          BAUD            = 115_200,
  parameter int          PULSE_PERIOD    = 32,
  parameter int          WR_GATE_EDGES   = 32,
  parameter logic [7:0]  CH_DELAY        = 8'h00,
  parameter int          IN_FIFO_LOG2    = 4,
  parameter int          F64_LOG2        = 9,
  parameter int          CAP_LOG2        = 13,
  parameter int          INSTR_FIFO_LOG2 = 4,
  parameter int          ARM_RST_CYCLES  = 16
) (
  input  logic                         sys_clk,
  input  logic                         sys_rst,
  input  logic [N_CH/2-1:0]            adc_clk,
  input  logic [N_CH-1:0][fe_pkg::LANE_W-1:0] adc_ddr,
  input  logic [N_CH-1:0]              dly_inc,
  output logic [N_CH-1:0][4:0]         dly_tap,
  input  logic                         test_mode,
  input  logic                         uart_rx,
  input  logic                         arm,
  input  logic                         trigger,
  input  logic [13:0]                  burst_frames,
  input  logic                         cap_re,
  output logic [15:0]                  cap_dout,
  output logic                         cap_empty,
  output logic [CAP_LOG2:0]            cap_level,
  output logic                         capturing,
  output logic                         burst_done,
  output logic                         instr_dropped
);
  localparam int N_CHIPS = N_CH / 2;

  // ------------------------------------------------------------------ resets
  logic fifo_rst_sys;                      // arm request, sys_clk
  logic acq_arst;                          // asynchronous reset of the FIFO stages
  logic [N_CHIPS-1:0] chip_rst;            // general reset per chip domain
  logic [N_CHIPS-1:0] chip_acq_rst;        // FIFO reset per chip domain
  logic sys_acq_rst;                       // FIFO reset, sys_clk domain

  assign acq_arst = sys_rst | fifo_rst_sys;

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_rst
    reset_sync u_rs  (.clk(adc_clk[c]), .arst(sys_rst),  .rst(chip_rst[c]));
    reset_sync u_ars (.clk(adc_clk[c]), .arst(acq_arst), .rst(chip_acq_rst[c]));
  end
  reset_sync u_sys_ars (.clk(sys_clk), .arst(acq_arst), .rst(sys_acq_rst));

  // ------------------------------------------------------- coefficient path
  logic [7:0]     rx_byte;
  logic           rx_valid;
  fe_pkg::instr_t instr;
  logic           instr_valid;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk(sys_clk), .rst(sys_rst), .rx(uart_rx), .data_out(rx_byte), .data_out_ready(rx_valid)
  );

  read_fsm u_read (
    .clk(sys_clk), .rst(sys_rst), .byte_in(rx_byte), .byte_valid(rx_valid),
    .instr, .instr_valid
  );

  logic [N_CHIPS-1:0] ififo_full, ififo_we, ififo_empty, ififo_re;
  fe_pkg::instr_t     ififo_q [N_CHIPS];
  logic               instr_ok;

  assign instr_ok = instr.filter < 16'(N_CH);
  always_comb begin
    ififo_we = '0;
    if (instr_valid && instr_ok) ififo_we[instr.filter[$clog2(N_CH)-1:1]] = 1'b1;
  end

  always_ff @(posedge sys_clk) begin
    if (sys_rst) instr_dropped <= 1'b0;
    else if (instr_valid && (!instr_ok || |(ififo_we & ififo_full))) instr_dropped <= 1'b1;
  end

  // Per-filter reload stream
  logic [N_CH-1:0]                  rl_tvalid, rl_tready, rl_tlast, cfg_tvalid;
  logic [N_CH-1:0][15:0]            rl_tdata;

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_reload
    fe_pkg::coef_t tdata;
    logic          tlast;

    async_fifo #(.WIDTH(32), .DEPTH_LOG2(INSTR_FIFO_LOG2)) u_ififo (
      .wclk(sys_clk), .wrst(sys_rst), .we(ififo_we[c]), .wdata(instr), .full(ififo_full[c]),
      .rclk(adc_clk[c]), .rrst(chip_rst[c]), .re(ififo_re[c]), .rdata(ififo_q[c]), .empty(ififo_empty[c])
    );

    reload_fsm #(.N_FILT(2), .FIRST_FILT(2*c), .NTAPS(NTAPS)) u_reload (
      .clk(adc_clk[c]), .rst(chip_rst[c]),
      .fifo_empty(ififo_empty[c]), .fifo_re(ififo_re[c]), .fifo_data(ififo_q[c]),
      .reload_tvalid(rl_tvalid[2*c +: 2]), .reload_tready(rl_tready[2*c +: 2]),
      .reload_tdata(tdata), .reload_tlast(tlast), .config_tvalid(cfg_tvalid[2*c +: 2])
    );
    assign rl_tdata[2*c]   = tdata;
    assign rl_tdata[2*c+1] = tdata;
    assign rl_tlast[2*c]   = tlast;
    assign rl_tlast[2*c+1] = tlast;
  end

  // ------------------------------------------------------ per-channel front
  logic [N_CHIPS-1:0]          wr_gate;
  logic [N_CHIPS-1:0][13:0]    pulse;
  logic [N_CH-1:0]             in_empty, in_full;
  logic [N_CH-1:0][15:0]       in_q;
  logic                        in_re;

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    fifo_wr_gate #(.EDGES(WR_GATE_EDGES)) u_gate (
      .clk(adc_clk[c]), .rst(chip_acq_rst[c]), .wr_en(wr_gate[c])
    );
    pulse_gen #(.PERIOD(PULSE_PERIOD), .W(14)) u_pulse (
      .clk(adc_clk[c]), .rst(chip_rst[c]), .pulse(pulse[c])
    );
  end

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    localparam int C = ch / 2;
    logic [13:0]        raw, fin;
    logic signed [15:0] fout, dly;

    iodelay_tap_ctrl #(.TAPS(32), .INIT_TAP(16)) u_tap (
      .clk(sys_clk), .rst(sys_rst), .inc(dly_inc[ch]), .tap(dly_tap[ch])
    );

    adc_ddr_capture #(.LANE_W(fe_pkg::LANE_W)) u_ddr (
      .clk(adc_clk[C]), .rst(chip_rst[C]), .ddr_in(adc_ddr[ch]), .sample(raw)
    );

    assign fin = test_mode ? pulse[C] : raw;

    fir_reload #(.NTAPS(NTAPS), .DIN_W(14), .COEF_W(16), .DOUT_W(16)) u_fir (
      .clk(adc_clk[C]), .rst(chip_rst[C]), .din(fin), .dout(fout),
      .s_axis_reload_tvalid(rl_tvalid[ch]), .s_axis_reload_tready(rl_tready[ch]),
      .s_axis_reload_tdata(rl_tdata[ch]), .s_axis_reload_tlast(rl_tlast[ch]),
      .s_axis_config_tvalid(cfg_tvalid[ch])
    );

    sample_delay #(.DELAY(int'(CH_DELAY[ch])), .W(16)) u_dly (
      .clk(adc_clk[C]), .rst(chip_rst[C]), .d(fout), .q(dly)
    );

    async_fifo #(.WIDTH(16), .DEPTH_LOG2(IN_FIFO_LOG2)) u_in (
      .wclk(adc_clk[C]), .wrst(chip_acq_rst[C]), .we(wr_gate[C]), .wdata(dly), .full(in_full[ch]),
      .rclk(adc_clk[0]), .rrst(chip_acq_rst[0]), .re(in_re), .rdata(in_q[ch]), .empty(in_empty[ch])
    );
  end

  // ------------------------------------------- common read, clk_ab domain
  logic rd_started;
  always_ff @(posedge adc_clk[0]) begin
    if (chip_acq_rst[0])  rd_started <= 1'b0;
    else if (~|in_empty)  rd_started <= 1'b1;
  end
  assign in_re = rd_started && ~|in_empty;

  logic cap_en_ab;
  sync_bit u_cap_sync (.clk(adc_clk[0]), .rst(chip_acq_rst[0]), .d(capturing), .q(cap_en_ab));

  logic [N_CH-1:0]           f64_empty;
  logic [N_CH-1:0][63:0]     f64_q;
  logic                      cap_we, cap_full;

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_f64
    logic full_unused;
    fifo_16to64 #(.DEPTH_LOG2(F64_LOG2)) u_f64 (
      .wclk(adc_clk[0]), .wrst(chip_acq_rst[0]), .we(in_re && cap_en_ab), .din(in_q[ch]), .full(full_unused),
      .rclk(sys_clk), .rrst(sys_acq_rst), .re(cap_we), .dout(f64_q[ch]), .empty(f64_empty[ch])
    );
  end

  // ------------------------------------------------- burst control, sys_clk
  capture_ctrl #(.ARM_RST_CYCLES(ARM_RST_CYCLES), .LEN_W(14)) u_ctrl (
    .clk(sys_clk), .rst(sys_rst), .arm, .trigger, .burst_frames,
    .frames_ready(~|f64_empty), .cap_full,
    .fifo_rst(fifo_rst_sys), .capturing, .cap_we, .done(burst_done)
  );

  capture_fifo #(.N_CH(N_CH), .DEPTH_LOG2(CAP_LOG2)) u_cap (
    .clk(sys_clk), .rst(sys_acq_rst), .we(cap_we), .din(f64_q), .full(cap_full),
    .re(cap_re), .dout(cap_dout), .empty(cap_empty), .level(cap_level)
  );
endmodule
