// READ FSM: assembles 32-bit coefficient instructions from serial bytes.
//
// Instructions are sent as four bytes, most significant first; bits 31:16
// name the filter and bits 15:0 carry one coefficient.  This Moore machine
// steps through one state per expected byte and, after the fourth, spends
// one state presenting the complete instruction with `instr_valid` high for
// one clock (the push into the instruction FIFO).  There is no time-out
// between bytes; a lost byte shifts the framing until reset.
module read_fsm
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] byte_in,
  input  logic       byte_valid,
  output fe_pkg::instr_t     instr,
  output logic       instr_valid
);
  typedef enum logic [2:0] {B3, B2, B1, B0, PUSH} state_t;
  state_t      state;
  logic [31:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B3;
      sh    <= '0;
    end else begin
      case (state)
        B3:   if (byte_valid) begin sh[31:24] <= byte_in; state <= B2;   end
        B2:   if (byte_valid) begin sh[23:16] <= byte_in; state <= B1;   end
        B1:   if (byte_valid) begin sh[15:8]  <= byte_in; state <= B0;   end
        B0:   if (byte_valid) begin sh[7:0]   <= byte_in; state <= PUSH; end
        PUSH: state <= B3;
        default: state <= B3;
      endcase
    end
  end

  // Moore outputs: depend on the state only.
  assign instr       = fe_pkg::instr_t'(sh);
  assign instr_valid = (state == PUSH);
endmodule
