// sbox_en_fsm: sub-state machine of the "set number of S-boxes" command.
//
// READY waits for 'start'; the 5 parameter bits p are then decoded in SET_EN
// into a thermometer code that enables S-box copies 0..p (so 1 to 32
// copies), and DONE reports completion for one cycle. The enable vector is
// held until the next such command. The three states follow the design; the
// thermometer decoding (p+1 copies) is this design's reading of "up to 32
// S-boxes from 5 bits".
//
// Timing: start -> en valid 2 cycles later, done high in the 2nd cycle.
// Reset enables copy 0 only. Because every code enables at least copy 0,
// en[0] is always 1 and synthesis turns it into a constant; it stays in the
// vector so that each copy has its own enable bit.
module sbox_en_fsm
  import cpa_pkg::*;
#(
  parameter int unsigned N_EN = EN_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [PARAM_W-1:0] param,
  output logic [N_EN-1:0]    en,
  output logic               done
);

  typedef enum logic [1:0] {READY, SET_EN, DONE} state_e;

  state_e             state;
  logic [PARAM_W-1:0] p_q;

  assign done = (state == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= READY;
      p_q   <= '0;
      en    <= N_EN'(1);
    end else begin
      unique case (state)
        READY: if (start) begin
          p_q   <= param;
          state <= SET_EN;
        end
        SET_EN: begin
          for (int i = 0; i < N_EN; i++) en[i] <= (i <= int'(p_q));
          state <= DONE;
        end
        DONE:    state <= READY;
        default: state <= READY;
      endcase
    end
  end

endmodule
