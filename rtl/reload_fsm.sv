// RELOAD FSM: turns queued instructions into coefficient reloads.
//
// Runs on the ADC clock of the filters it serves (filters FIRST_FILT ..
// FIRST_FILT+N_FILT-1).  While the instruction FIFO is not empty it reads the
// first instruction of a set, takes the filter from its upper half and then
// streams NTAPS coefficients to that filter: reload_tvalid and reload_tdata
// carry one coefficient per accepted beat, and reload_tlast marks the
// NTAPS-th.  If the FIFO runs empty in the middle of a set, reload_tvalid
// drops on the next clock and the set resumes when data returns.  The clock
// after the tlast beat is accepted, config_tvalid of that filter is high for
// one clock, which makes the new set active.
//
// The filter field of the 2nd..NTAPS-th instructions of a set is not checked,
// and an instruction naming a filter outside this FSM's range is read and
// discarded; both are this design's choices.  Outputs are registered.
module reload_fsm
#(
  parameter int N_FILT     = 8,
  parameter int FIRST_FILT = 0,
  parameter int NTAPS      = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              fifo_empty,
  output logic              fifo_re,
  input  fe_pkg::instr_t            fifo_data,
  output logic [N_FILT-1:0] reload_tvalid,
  input  logic [N_FILT-1:0] reload_tready,
  output fe_pkg::coef_t             reload_tdata,
  output logic              reload_tlast,
  output logic [N_FILT-1:0] config_tvalid
);
  localparam int SW = (N_FILT > 1) ? $clog2(N_FILT) : 1;

  typedef enum logic {IDLE, LOAD} state_t;
  state_t                    state;
  logic [SW-1:0]             sel;
  logic [$clog2(NTAPS+1)-1:0] issued;     // beats placed on the bus
  logic                      vld;        // a beat is on the bus
  logic                      in_range;
  logic                      take;       // pop the FIFO into the output stage
  logic                      sel_ready;

  logic [15:0] rel;                         // filter number relative to FIRST_FILT
  assign rel       = fifo_data.filter - 16'(FIRST_FILT);
  assign in_range  = (rel < 16'(N_FILT));
  assign sel_ready = reload_tready[sel];

  // The output stage may load a new beat when it is empty or being accepted.
  assign take = (state == LOAD) && !fifo_empty && (issued != ($clog2(NTAPS+1))'(NTAPS)) &&
                (!vld || sel_ready);

  always_comb begin
    fifo_re = 1'b0;
    if (state == IDLE && !fifo_empty && !in_range) fifo_re = 1'b1;  // discard
    if (take)                                      fifo_re = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      sel           <= '0;
      issued        <= '0;
      vld           <= 1'b0;
      reload_tdata  <= '0;
      reload_tlast  <= 1'b0;
      config_tvalid <= '0;
    end else begin
      config_tvalid <= '0;
      case (state)
        IDLE: begin
          issued <= '0;
          if (!fifo_empty && in_range) begin
            sel   <= SW'(rel);
            state <= LOAD;
          end
        end
        LOAD: begin
          if (vld && sel_ready && reload_tlast) begin
            // last coefficient accepted: apply the set next clock
            vld           <= 1'b0;
            reload_tlast  <= 1'b0;
            state         <= IDLE;
            config_tvalid <= N_FILT'(1) << sel;
          end else if (take) begin
            vld          <= 1'b1;
            reload_tdata <= fifo_data.coef;
            reload_tlast <= (issued == ($clog2(NTAPS+1))'(NTAPS - 1));
            issued       <= issued + 1'b1;
          end else if (vld && sel_ready) begin
            vld <= 1'b0;    // FIFO ran empty: drop valid
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign reload_tvalid = vld ? (N_FILT'(1) << sel) : '0;

  // A beat stays on the bus, unchanged, until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (rst)
      (vld && !sel_ready) |=> (vld && $stable(reload_tdata) && $stable(reload_tlast)));
endmodule
