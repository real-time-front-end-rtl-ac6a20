// Testbench of fir_reload.  A cycle-by-cycle reference model (tap history,
// shadow and active coefficient sets) is kept in the testbench; every output
// sample is compared with it, which also checks the 2-clock latency.
// Covered: pass-through reset set; reloads with gaps in tvalid, written
// last coefficient first; tready low between tlast and config; old set still
// active until config; the unit-pulse test (output = coefficients, every 32
// clocks); positive and negative saturation.
`timescale 1ns/1ps
module tb_fir_reload;
  localparam int N = 10;
  logic clk = 0, rst = 1;
  logic signed [13:0] din = '0;
  logic signed [15:0] dout;
  logic rv = 0, rlast = 0, cfg = 0, rready;
  logic [15:0] rdata = '0;
  int checks = 0, failures = 0;

  fir_reload #(.NTAPS(N), .DIN_W(14), .COEF_W(16), .DOUT_W(16)) dut (
    .clk, .rst, .din, .dout,
    .s_axis_reload_tvalid(rv), .s_axis_reload_tready(rready), .s_axis_reload_tdata(rdata),
    .s_axis_reload_tlast(rlast), .s_axis_config_tvalid(cfg)
  );

  always #2 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  longint xh [N];
  longint cm [N], sm [N];
  int     widx_m = N - 1;
  bit     wait_m = 0;
  longint exp_pending = 0;
  int     sat_hi = 0, sat_lo = 0;

  function automatic longint model_out();
    longint acc = 0;
    for (int k = 0; k < N; k++) acc += cm[k] * xh[k];
    if (acc > 32767)  return 32767;
    if (acc < -32768) return -32768;
    return acc;
  endfunction

  // Apply inputs now (half a cycle after an edge), advance one clock, update
  // the model with what that edge did and check the output.
  task automatic step(longint x, bit v = 0, logic [15:0] d = '0, bit l = 0, bit c = 0);
    bit acc;
    din = 14'(x); rv = v; rdata = d; rlast = l; cfg = c;
    checks++;
    if (rready !== !wait_m) begin failures++; $display("tready %b, expected %b", rready, !wait_m); end
    acc = v && rready;
    @(posedge clk); #0.5;
    for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = x;
    if (acc) begin
      sm[widx_m] = longint'($signed(d));
      if (l) begin widx_m = N - 1; wait_m = 1; end
      else if (widx_m != 0) widx_m--;
    end
    if (c) begin cm = sm; wait_m = 0; widx_m = N - 1; end
    checks++;
    if (longint'(dout) != exp_pending) begin
      failures++;
      $display("t=%0t dout %0d expected %0d", $time, dout, exp_pending);
    end
    if (exp_pending == 32767) sat_hi++;
    if (exp_pending == -32768) sat_lo++;
    exp_pending = model_out();
    rv = 0; rlast = 0; cfg = 0;
  endtask

  function automatic longint rnd14();
    return longint'($signed(14'($urandom)));
  endfunction

  // Reload a full set (h[N-1] first) with random gaps; check tready after tlast.
  task automatic reload(longint h [N]);
    int k = N - 1;
    while (k >= 0) begin
      if (($urandom % 3) == 0) step(rnd14());
      else begin
        step(rnd14(), 1, 16'(h[k]), k == 0);
        k--;
      end
    end
    checks++;
    if (rready !== 1'b0) begin failures++; $display("tready high after tlast"); end
    repeat (3) step(rnd14());    // old set still active
    step(rnd14(), 0, '0, 0, 1);  // config
  endtask

  initial begin
    longint h [N];
    for (int k = 0; k < N; k++) begin xh[k] = 0; cm[k] = (k == 0); sm[k] = (k == 0); end
    repeat (2) @(posedge clk);
    #0.5 rst = 0;
    #0.1;
    exp_pending = 0;
    repeat (50) step(rnd14());

    for (int k = 0; k < N; k++) h[k] = longint'($signed(16'($urandom))) >>> 4;
    reload(h);
    repeat (100) step(rnd14());

    // unit-pulse test: output must repeat the coefficients every 32 clocks
    repeat (N) step(0);
    for (int rep = 0; rep < 3; rep++) begin
      step(1);
      step(0);   // first coefficient appears two clocks after the pulse
      for (int k = 0; k < 30; k++) begin
        if (k < N) begin
          checks++;
          if (longint'(dout) != cm[k]) begin failures++; $display("pulse %0d: out %0d coef %0d", k, dout, cm[k]); end
        end
        step(0);
      end
    end

    // saturation
    for (int k = 0; k < N; k++) h[k] = 32767;
    reload(h);
    repeat (2 * N) step(8191);
    repeat (2 * N) step(-8192);
    repeat (20) step(rnd14());
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not reached"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
