// measure_fsm: sub-state machine of the "start measurement" command.
//
// One measurement walks READY -> ENCRYP_DATA -> SET_TRIGGER -> MEASURE ->
// RESET_TRIGGER -> DONE, one clock per state:
//   ENCRYP_DATA    the current LFSR byte is registered onto sbox_bits;
//   SET_TRIGGER    trigger rises; enabled S-box copies load sbox_bits;
//   MEASURE        trigger still high; en2 loads the S-box outputs;
//   RESET_TRIGGER  trigger falls; the XOR of the outputs is captured;
//   DONE           done (command finished, result valid) and the LFSR steps.
// The trigger is registered so the oscilloscope sees a clean two-cycle
// pulse that covers exactly the S-box evaluation. The state sequence and the
// signal each state drives follow the design; one clock per state and
// stepping the LFSR at the end are this design's choices.
//
// Timing: start -> trigger high in cycles 2-3 -> done in cycle 5.
module measure_fsm
  import cpa_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  byte_t lfsr_value,
  output byte_t sbox_bits,
  output logic  trigger,
  output logic  en2,
  input  byte_t xor_result,
  output byte_t result,
  output logic  lfsr_step,
  output logic  done
);

  typedef enum logic [2:0] {READY, ENCRYP_DATA, SET_TRIGGER, MEASURE,
                            RESET_TRIGGER, DONE} state_e;

  state_e state;

  assign en2       = (state == MEASURE);
  assign done      = (state == DONE);
  assign lfsr_step = (state == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= READY;
      sbox_bits <= '0;
      trigger   <= 1'b0;
      result    <= '0;
    end else begin
      unique case (state)
        READY:       if (start) state <= ENCRYP_DATA;
        ENCRYP_DATA: begin
          sbox_bits <= lfsr_value;
          trigger   <= 1'b1;
          state     <= SET_TRIGGER;
        end
        SET_TRIGGER: state <= MEASURE;
        MEASURE: begin
          trigger <= 1'b0;
          state   <= RESET_TRIGGER;
        end
        RESET_TRIGGER: begin
          result <= xor_result;
          state  <= DONE;
        end
        DONE:    state <= READY;
        default: state <= READY;
      endcase
    end
  end

  a_trigger_window: assert property (@(posedge clk) disable iff (rst)
    trigger == (state inside {SET_TRIGGER, MEASURE}));

endmodule
