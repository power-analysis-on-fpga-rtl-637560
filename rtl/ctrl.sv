// ctrl: command controller of the experiment platform.
//
// The main machine sits in WAIT until the UART raises rd_req, takes the byte
// and acknowledges it in FETCH, and in EXE_CMD pulses start_cmd to the
// sub-state machines with the command code held in cmd_reg:
//   000 set LSB / 001 set MSB  -> lfsr_fsm writes the seed (param 3:0)
//   010 set number of S-boxes  -> sbox_en_fsm builds the enable vector
//   011 start measurement      -> measure_fsm runs one trigger window
// When the sub-machine reports done, a seed or enable command returns to
// WAIT; a measurement goes to SEND_RESULT, which holds wr_req with the XOR
// result on data_out until the UART answers wr_ack. Reserved codes
// (100-111) are dropped in FETCH. The controller also holds the plaintext
// LFSR. The states, command table and hand-shakes follow the design; the
// byte layout (command in bits 7:5, parameters in 4:0) is this design's
// choice.
//
// Timing: rd_ack is a one-cycle pulse; a set command takes 5 cycles from
// rd_req to WAIT, a measurement 8 cycles to wr_req.
module ctrl
  import cpa_pkg::*;
#(
  parameter int unsigned N_EN = EN_W
) (
  input  logic            clk,
  input  logic            rst,
  // UART receive hand-shake
  input  byte_t           data_in,
  input  logic            rd_req,
  output logic            rd_ack,
  // UART transmit hand-shake
  output byte_t           data_out,
  output logic            wr_req,
  input  logic            wr_ack,
  // S-box logic
  output logic            trigger,
  output logic [N_EN-1:0] en,
  output logic            en2,
  output byte_t           sbox_bits,
  input  byte_t           xor_result
);

  typedef enum logic [1:0] {WAIT, FETCH, EXE_CMD, SEND_RESULT} state_e;

  state_e    state;
  cmd_byte_t cmd_reg;
  logic      start_cmd;
  logic      done_lfsr, done_en, done_meas, cmd_done;
  logic      load_lsb, load_msb, lfsr_step;
  byte_t     lfsr_value, meas_result;

  assign rd_ack   = (state == FETCH);
  assign wr_req   = (state == SEND_RESULT);
  assign cmd_done = done_lfsr | done_en | done_meas;

  function automatic logic reserved(logic [CMD_W-1:0] c);
    return !(c inside {CMD_SET_LSB, CMD_SET_MSB, CMD_SET_SBOX, CMD_MEASURE});
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= WAIT;
      cmd_reg   <= '0;
      start_cmd <= 1'b0;
      data_out  <= '0;
    end else begin
      start_cmd <= 1'b0;
      unique case (state)
        WAIT: if (rd_req) begin
          cmd_reg <= cmd_byte_t'(data_in);
          state   <= FETCH;
        end
        FETCH: begin
          if (reserved(cmd_reg.cmd)) state <= WAIT;
          else begin
            start_cmd <= 1'b1;
            state     <= EXE_CMD;
          end
        end
        EXE_CMD: if (cmd_done) begin
          if (cmd_reg.cmd == CMD_MEASURE) begin
            data_out <= meas_result;
            state    <= SEND_RESULT;
          end else begin
            state <= WAIT;
          end
        end
        SEND_RESULT: if (wr_ack) state <= WAIT;
        default:     state <= WAIT;
      endcase
    end
  end

  lfsr_fsm u_lfsr_fsm (
    .clk(clk), .rst(rst),
    .start(start_cmd && (cmd_reg.cmd inside {CMD_SET_LSB, CMD_SET_MSB})),
    .cmd(cmd_reg.cmd), .load_lsb(load_lsb), .load_msb(load_msb), .done(done_lfsr));

  lfsr u_lfsr (
    .clk(clk), .rst(rst), .load_lsb(load_lsb), .load_msb(load_msb),
    .seed(cmd_reg.param[SEED_W-1:0]), .step(lfsr_step), .value(lfsr_value));

  sbox_en_fsm #(.N_EN(N_EN)) u_en_fsm (
    .clk(clk), .rst(rst), .start(start_cmd && cmd_reg.cmd == CMD_SET_SBOX),
    .param(cmd_reg.param), .en(en), .done(done_en));

  measure_fsm u_meas_fsm (
    .clk(clk), .rst(rst), .start(start_cmd && cmd_reg.cmd == CMD_MEASURE),
    .lfsr_value(lfsr_value), .sbox_bits(sbox_bits), .trigger(trigger), .en2(en2),
    .xor_result(xor_result), .result(meas_result), .lfsr_step(lfsr_step),
    .done(done_meas));

  // Transmit hand-shake: the byte stays put while it is requested.
  a_wr_stable: assert property (@(posedge clk) disable iff (rst)
    wr_req && !wr_ack |=> wr_req && $stable(data_out));
  // Only one sub-state machine may finish at a time.
  a_one_done: assert property (@(posedge clk) disable iff (rst)
    $onehot0({done_lfsr, done_en, done_meas}));

endmodule
