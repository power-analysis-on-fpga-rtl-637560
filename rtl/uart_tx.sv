// uart_tx: serial transmitter with a request/acknowledge hand-off.
//
// In WAIT_UART the line idles high. A wr_req moves it to SEND_INIT, which
// loads the shift register with {stop=1, data, start=0} and restarts the baud
// generator; SEND_DATA then acknowledges the byte with a one-cycle wr_ack
// and shifts the register right, filling with zeros, every two half-bit
// ticks. The line carries bit 0 of the register. Once the stop bit has been
// shifted out the register is zero and the machine returns to WAIT_UART.
// States and the zero-register end condition follow the design; the frame
// format (8N1, LSB first) is the usual RS-232 one.
//
// Timing: wr_ack two cycles after wr_req is seen in WAIT_UART; a frame lasts
// 10 bit times; a new request is accepted only in WAIT_UART.
module uart_tx
  import cpa_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 115_200
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  wr_req,
  output logic  wr_ack,
  input  byte_t data,
  output logic  tx
);

  typedef enum logic [1:0] {WAIT_UART, SEND_INIT, SEND_DATA} state_e;

  state_e      state;
  logic [9:0]  shift_reg;
  logic        half;          // second half of the current bit
  logic        restart, tick;

  baud_gen #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD(BAUD)) u_baud (
    .clk(clk), .rst(rst), .restart(restart), .tick(tick));

  assign restart = (state == SEND_INIT);
  assign tx      = (state == SEND_DATA) ? shift_reg[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= WAIT_UART;
      shift_reg <= '0;
      half      <= 1'b0;
      wr_ack    <= 1'b0;
    end else begin
      wr_ack <= 1'b0;
      unique case (state)
        WAIT_UART: if (wr_req) state <= SEND_INIT;
        SEND_INIT: begin
          shift_reg <= {1'b1, data, 1'b0};
          half      <= 1'b0;
          wr_ack    <= 1'b1;
          state     <= SEND_DATA;
        end
        SEND_DATA: if (tick) begin
          half <= !half;
          if (half) begin
            shift_reg <= shift_reg >> 1;
            if ((shift_reg >> 1) == '0) state <= WAIT_UART;
          end
        end
        default: state <= WAIT_UART;
      endcase
    end
  end

endmodule
