// lfsr_fsm: sub-state machine of the two "set seed" commands.
//
// On 'start' it goes from READY to SET_LSB or SET_MSB according to the
// command code, asserts the matching load strobe of the LFSR for one cycle,
// and then reports completion from DONE for one cycle. The states follow the
// design.
//
// Timing: start -> load strobe in the next cycle -> done the cycle after.
module lfsr_fsm
  import cpa_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [CMD_W-1:0] cmd,
  output logic             load_lsb,
  output logic             load_msb,
  output logic             done
);

  typedef enum logic [1:0] {READY, SET_LSB, SET_MSB, DONE} state_e;

  state_e state;

  assign load_lsb = (state == SET_LSB);
  assign load_msb = (state == SET_MSB);
  assign done     = (state == DONE);

  always_ff @(posedge clk) begin
    if (rst) state <= READY;
    else begin
      unique case (state)
        READY: if (start) begin
          if (cmd == CMD_SET_LSB)      state <= SET_LSB;
          else if (cmd == CMD_SET_MSB) state <= SET_MSB;
        end
        SET_LSB, SET_MSB: state <= DONE;
        DONE:             state <= READY;
        default:          state <= READY;
      endcase
    end
  end

endmodule
