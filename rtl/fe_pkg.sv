// Shared constants and types of the eight-channel acquisition front end.
//
// The front end samples eight analog sub-bands with four dual 14-bit ADCs,
// filters every channel with a reloadable FIR filter and buffers bursts of all
// eight channels together.  Coefficients arrive as 32-bit instructions over a
// serial line: the upper half names the filter, the lower half is one
// coefficient value.  The channel count, sample widths, tap count and the
// instruction layout follow the design description; nothing here is clocked.
package fe_pkg;

  localparam int N_CH          = 8;   // analog sub-bands / ADC channels
  localparam int ADC_W         = 14;  // ADC resolution
  localparam int LANE_W        = 7;   // DDR lanes per channel (ADC_W / 2)
  localparam int SAMPLE_W      = 16;  // stored sample width
  localparam int COEF_W        = 16;  // FIR coefficient width
  localparam int NTAPS         = 10;  // FIR taps per filter

  typedef logic signed [ADC_W-1:0]    adc_sample_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  // One serial-protocol instruction: bits 31:16 filter number, 15:0 coefficient.
  typedef struct packed {
    logic [15:0] filter;
    coef_t       coef;
  } instr_t;

endpackage
