// RS-232 receiver: 8 data bits, LSB first, 1 stop bit, no parity.
//
// The line is synchronised with two flops.  A falling edge starts a frame;
// the start bit is confirmed half a bit later and every following bit is
// sampled in its middle, counting CLK_HZ/BAUD clocks per bit.  When the stop
// bit is high the byte appears on `data_out` with a one-clock
// `data_out_ready` strobe; otherwise the byte is dropped.  Frame format and
// baud rate follow the description; the sampling scheme is this design's.
// Timing: `data_out_ready` pulses in the middle of the stop bit.
module uart_rx #(
  parameter int CLK_HZ = 200_000_000,
  parameter int BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data_out,
  output logic       data_out_ready
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t          state;
  logic [CW-1:0]   cnt;
  logic [2:0]      bitn;
  logic [7:0]      shreg;
  logic            rx_s1, rx_s;

  always_ff @(posedge clk) begin
    if (rst) {rx_s, rx_s1} <= 2'b11;
    else     {rx_s, rx_s1} <= {rx_s1, rx};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= IDLE;
      cnt            <= '0;
      bitn           <= '0;
      shreg          <= '0;
      data_out       <= '0;
      data_out_ready <= 1'b0;
    end else begin
      data_out_ready <= 1'b0;
      case (state)
        IDLE: if (!rx_s) begin
          state <= START;
          cnt   <= CW'(DIV / 2 - 1);
        end
        START: if (cnt == '0) begin
          if (!rx_s) begin
            state <= DATA;
            cnt   <= CW'(DIV - 1);
            bitn  <= '0;
          end else begin
            state <= IDLE;   // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == '0) begin
          shreg <= {rx_s, shreg[7:1]};
          cnt   <= CW'(DIV - 1);
          if (bitn == 3'd7) state <= STOP;
          bitn  <= bitn + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == '0) begin
          state <= IDLE;
          if (rx_s) begin
            data_out       <= shreg;
            data_out_ready <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
