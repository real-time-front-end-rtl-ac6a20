// Shared burst buffer of all eight channels (512 KB at the default size).
//
// One write stores a 64-bit frame (four samples) from every channel at once;
// it is issued only when all channel FIFOs hold a frame, so the channels stay
// sample-aligned.  The read side hands out 16-bit words in the order the host
// expects: channel 1 samples 1-4, channel 2 samples 1-4, ... channel N_CH,
// then the next entry.  Storage is 2**DEPTH_LOG2 entries of N_CH x 64 bits.
//
// Interface: `dout` shows the next word whenever `empty` is low (first word
// fall through); `re` advances by one word.  `level` counts whole or partly
// read entries.  Writes when full and reads when empty are ignored.
module capture_fifo #(
  parameter int N_CH       = 8,
  parameter int DEPTH_LOG2 = 13
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   we,
  input  logic [N_CH-1:0][63:0]  din,
  output logic                   full,
  input  logic                   re,
  output logic [15:0]            dout,
  output logic                   empty,
  output logic [DEPTH_LOG2:0]    level
);
  localparam int DEPTH = 1 << DEPTH_LOG2;
  localparam int WORDS = N_CH * 4;   // 16-bit words per entry

  logic [N_CH*64-1:0]      mem [DEPTH];
  logic [DEPTH_LOG2:0]     wptr, rptr;
  logic [$clog2(WORDS)-1:0] word;
  logic [N_CH*64-1:0]      entry;

  assign level = wptr - rptr;
  assign full  = (level == (DEPTH_LOG2+1)'(DEPTH));
  assign empty = (wptr == rptr);

  always_ff @(posedge clk) begin
    if (rst) wptr <= '0;
    else if (we && !full) wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we && !full) mem[wptr[DEPTH_LOG2-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rptr <= '0;
      word <= '0;
    end else if (re && !empty) begin
      if (word == ($clog2(WORDS))'(WORDS - 1)) begin
        word <= '0;
        rptr <= rptr + 1'b1;
      end else begin
        word <= word + 1'b1;
      end
    end
  end

  assign entry = mem[rptr[DEPTH_LOG2-1:0]];
  assign dout  = entry[word*16 +: 16];
endmodule
