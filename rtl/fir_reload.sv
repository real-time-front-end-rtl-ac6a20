// Single-rate FIR filter with reloadable coefficients.
//
// One filter sits on every ADC channel, running on that channel's ADC clock
// at one sample per clock: y[n] = sum_k h[k] * x[n-k], k = 0..NTAPS-1, with a
// 14-bit signed input, 16-bit signed coefficients and a 16-bit signed output.
// The full-precision sum is saturated to 16 bits without scaling, so a unit
// pulse at the input reproduces the coefficients at the output.
//
// Coefficient reload follows the streaming interface of the vendor filter
// core the design was first built with: beats on s_axis_reload_* (valid and
// ready) write a shadow coefficient set, the first beat writing h[NTAPS-1]
// and each following beat the next lower index; the beat with tlast ends the
// set.  s_axis_config_tvalid then copies the shadow set into the active set
// in one clock.  reload_tready is low in reset and between the tlast beat and
// the config strobe.  A tlast before NTAPS beats leaves the lower
// coefficients of the shadow set unchanged.
//
// The adder tree, saturation and the reset set (h[0] = 1, the rest 0, so the
// filter passes its input) are this design's choices.
// Timing: latency 2 clocks from din to dout; a config strobe at edge t
// affects outputs from edge t+2 on.
module fir_reload #(
  parameter int NTAPS  = 10,
  parameter int DIN_W  = 14,
  parameter int COEF_W = 16,
  parameter int DOUT_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DIN_W-1:0]  din,
  output logic signed [DOUT_W-1:0] dout,
  input  logic                     s_axis_reload_tvalid,
  output logic                     s_axis_reload_tready,
  input  logic [COEF_W-1:0]        s_axis_reload_tdata,
  input  logic                     s_axis_reload_tlast,
  input  logic                     s_axis_config_tvalid
);
  localparam int ACC_W = DIN_W + COEF_W + $clog2(NTAPS);
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (DOUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (DOUT_W-1));

  logic signed [COEF_W-1:0] coef   [NTAPS];   // active set
  logic signed [COEF_W-1:0] shadow [NTAPS];   // set being reloaded
  logic signed [DIN_W-1:0]  taps   [NTAPS];   // x[n-1] .. x[n-NTAPS] after the edge
  logic [$clog2(NTAPS)-1:0] widx;             // shadow index of the next beat
  logic                     waiting_cfg;      // tlast seen, config not yet

  assign s_axis_reload_tready = !rst && !waiting_cfg;

  // ---- reload interface
  always_ff @(posedge clk) begin
    if (rst) begin
      widx        <= ($clog2(NTAPS))'(NTAPS - 1);
      waiting_cfg <= 1'b0;
      for (int k = 0; k < NTAPS; k++) begin
        coef[k]   <= (k == 0) ? COEF_W'(1) : '0;
        shadow[k] <= (k == 0) ? COEF_W'(1) : '0;
      end
    end else begin
      if (s_axis_reload_tvalid && s_axis_reload_tready) begin
        shadow[widx] <= s_axis_reload_tdata;
        if (s_axis_reload_tlast) begin
          widx        <= ($clog2(NTAPS))'(NTAPS - 1);
          waiting_cfg <= 1'b1;
        end else if (widx != '0) begin
          widx <= widx - 1'b1;
        end
      end
      if (s_axis_config_tvalid) begin
        coef        <= shadow;
        waiting_cfg <= 1'b0;
        widx        <= ($clog2(NTAPS))'(NTAPS - 1);
      end
    end
  end

  // ---- datapath: tap delay line, then multiply-accumulate and saturate
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
    end else begin
      taps[0] <= din;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
    end
  end

  logic signed [ACC_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc += ACC_W'(taps[k]) * ACC_W'(coef[k]);
  end

  always_ff @(posedge clk) begin
    if (rst)              dout <= '0;
    else if (acc > MAXV)  dout <= MAXV[DOUT_W-1:0];
    else if (acc < MINV)  dout <= MINV[DOUT_W-1:0];
    else                  dout <= acc[DOUT_W-1:0];
  end

  // A config strobe must not arrive in the middle of a coefficient set.
  a_cfg_after_last: assert property (@(posedge clk) disable iff (rst)
      s_axis_config_tvalid |-> (waiting_cfg || widx == ($clog2(NTAPS))'(NTAPS - 1)));
endmodule
