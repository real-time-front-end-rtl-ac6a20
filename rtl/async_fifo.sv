// Dual-clock FIFO with first-word-fall-through output.
//
// Used twice in the front end: per channel, to carry samples from the clock
// of their ADC chip to the common clock of the first chip, and for the
// coefficient instructions, from the system clock to an ADC clock.
// Binary pointers one bit wider than the address are kept in each domain;
// their Gray-coded copies cross to the other domain through two flops, so
// `full` and `empty` are conservative (they may clear a few cycles late).
// `rdata` shows the oldest word whenever `empty` is low; `re` pops it.
// A write while full and a read while empty are ignored.
// The depth is this design's choice; the description gives none.
module async_fifo #(
  parameter int WIDTH      = 16,
  parameter int DEPTH_LOG2 = 4
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2;   // read pointer seen in the write domain
  ptr_t wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain
  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      wbin  <= '0;
      wgray <= '0;
      {rgray_w2, rgray_w1} <= '0;
    end else begin
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      if (we && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[DEPTH_LOG2-1:0]] <= wdata;
  end

  // Full when the write pointer is one lap ahead of the read pointer.
  assign full = (wgray == {~rgray_w2[DEPTH_LOG2:DEPTH_LOG2-1], rgray_w2[DEPTH_LOG2-2:0]});

  // ---------------- read domain
  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) begin
      rbin  <= '0;
      rgray <= '0;
      {wgray_r2, wgray_r1} <= '0;
    end else begin
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      if (re && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[DEPTH_LOG2-1:0]];
endmodule
