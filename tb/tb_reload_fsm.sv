// Testbench of reload_fsm (8 filters).  A queue stands in for the
// instruction FIFO and random ready patterns for the filters.  Checks: the
// coefficients of each set reach the named filter in order, NTAPS beats with
// tlast on the last only; a beat is held until accepted; config_tvalid of
// that filter pulses once, the clock after the tlast beat; an empty FIFO in
// mid-set drops tvalid; out-of-range instructions are discarded.
`timescale 1ns/1ps
module tb_reload_fsm;
  localparam int NF = 8, NT = 10;
  logic clk = 0, rst = 1;
  logic fifo_empty, fifo_re;
  fe_pkg::instr_t fifo_data;
  logic [NF-1:0] tvalid, tready = '0, cfg;
  fe_pkg::coef_t tdata;
  logic tlast;
  int checks = 0, failures = 0;

  reload_fsm #(.N_FILT(NF), .FIRST_FILT(0), .NTAPS(NT)) dut (
    .clk, .rst, .fifo_empty, .fifo_re, .fifo_data,
    .reload_tvalid(tvalid), .reload_tready(tready), .reload_tdata(tdata),
    .reload_tlast(tlast), .config_tvalid(cfg)
  );

  always #2 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model: `avail` limits how many queued words are visible (to make it
  // run empty in the middle of a set).
  logic [31:0] fq[$];
  int avail = 0;
  bit pop_pending = 0;
  assign fifo_empty = (fq.size() == 0) || (avail == 0);
  assign fifo_data  = fe_pkg::instr_t'(fq.size() ? fq[0] : 32'h0);

  // expected beats
  int   exp_filt[$];
  logic [15:0] exp_coef[$];
  bit   exp_last[$];
  int   exp_cfg[$];
  int   beats = 0, cfgs = 0, stalls = 0, drops_seen = 0;
  bit   last_was_tlast = 0; int last_filt = 0;
  logic [NF-1:0] prev_tvalid = '0; logic [15:0] prev_tdata; bit prev_hold = 0;

  always @(posedge clk) begin
    if (!rst) begin
      // the pop decided last cycle happens just after the edge that did it
      #0.1;
      if (pop_pending) begin
        void'(fq.pop_front());
        avail--;
      end
      #0.4;
      // Decisions are taken half a cycle after the edge, when all outputs are
      // stable; they describe what the next edge does.
      if (last_was_tlast) begin
        checks++;
        if (cfg !== (NF'(1) << last_filt)) begin failures++; $display("config %b expected filter %0d", cfg, last_filt); end
        else cfgs++;
      end else begin
        checks++;
        if (cfg !== '0) begin failures++; $display("unexpected config %b", cfg); end
      end
      last_was_tlast = 0;
      if (prev_hold) begin
        checks++;
        if (tvalid !== prev_tvalid || tdata !== prev_tdata) begin failures++; $display("beat not held"); end
      end
      if (prev_tvalid != 0 && tvalid == 0) stalls++;
      tready = NF'($urandom);
      if (tvalid != 0) begin
        int f;
        checks++;
        if (!$onehot(tvalid)) begin failures++; $display("tvalid not one-hot %b", tvalid); end
        f = $clog2(tvalid);
        if (tready[f]) begin
          checks++;
          if (exp_filt.size() == 0) begin failures++; $display("unexpected beat"); end
          else begin
            int ef; logic [15:0] ec; bit el;
            ef = exp_filt.pop_front(); ec = exp_coef.pop_front(); el = exp_last.pop_front();
            if (f != ef || tdata !== ec || tlast !== el) begin
              failures++;
              $display("beat: filter %0d coef %h last %b, expected %0d %h %b", f, tdata, tlast, ef, ec, el);
            end
          end
          beats++;
          if (tlast) begin last_was_tlast = 1; last_filt = f; end
          prev_hold = 0;
        end else begin
          prev_hold = 1;
        end
      end else prev_hold = 0;
      prev_tvalid = tvalid; prev_tdata = tdata;
      // FIFO pop happens at the next edge if fifo_re is high now
      if (($urandom % 4) != 0 && avail < 64) avail++;
    end
  end

  // fifo_re depends on tready: sample it once it has settled, before the edge
  always @(negedge clk) begin
    pop_pending = fifo_re && !rst;
    if (fifo_re && fifo_empty) begin failures++; $display("read from empty FIFO"); end
  end

  task automatic send_set(int f);
    for (int k = 0; k < NT; k++) begin
      logic [15:0] c;
      c = 16'($urandom);
      fq.push_back({16'(f), c});
      exp_filt.push_back(f); exp_coef.push_back(c); exp_last.push_back(k == NT - 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #0.25 rst = 0;
    for (int s = 0; s < 30; s++) begin
      int f;
      f = $urandom % NF;
      if (s % 7 == 3) fq.push_back({16'(NF + s), 16'hDEAD});   // out of range: discarded
      send_set(f);
    end
    repeat (5000) @(posedge clk);
    checks++;
    if (exp_filt.size() != 0 || fq.size() != 0) begin failures++; $display("%0d beats missing", exp_filt.size()); end
    checks++;
    if (cfgs != 30) begin failures++; $display("%0d configs, expected 30", cfgs); end
    checks++;
    if (stalls == 0) begin failures++; $display("tvalid never dropped for an empty FIFO"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
