// uart_rx: serial receiver with a request/acknowledge hand-off.
//
// Receives 8N1 frames (start bit, 8 data bits LSB first, stop bit). In
// WAIT_UART it watches the synchronised line for a falling edge, the start
// bit, restarts the baud generator and moves to READY. There the half-bit
// ticks are counted: tick 1 is the middle of the start bit (a high line
// there is a glitch and aborts), ticks 3..17 the middles of the data bits
// and tick 19 the middle of the stop bit. A good stop bit moves to DATA_OUT,
// which raises rd_req with the byte on 'data' until rd_ack. There is no
// FIFO: a frame that starts outside WAIT_UART is lost. These states and the
// rd_req/rd_ack hand-off follow the design; the frame format, the glitch and
// stop-bit checks and the input synchroniser are this design's choices.
//
// Timing: rd_req rises about 9.5 bit times after the start edge (plus two
// synchroniser cycles) and stays high until the cycle after rd_ack.
module uart_rx
  import cpa_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 115_200
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rx,
  output logic  rd_req,
  input  logic  rd_ack,
  output byte_t data
);

  typedef enum logic [1:0] {WAIT_UART, READY, DATA_OUT} state_e;

  state_e      state;
  logic [2:0]  rx_sync;      // two synchroniser stages + previous value
  logic        restart, tick;
  logic [4:0]  ticks;

  baud_gen #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD(BAUD)) u_baud (
    .clk(clk), .rst(rst), .restart(restart), .tick(tick));

  always_ff @(posedge clk) begin
    if (rst) rx_sync <= '1;
    else     rx_sync <= {rx_sync[1:0], rx};
  end

  wire rx_s      = rx_sync[1];
  wire start_seen = rx_sync[2] && !rx_sync[1];

  assign restart = (state == WAIT_UART) && start_seen;
  assign rd_req  = (state == DATA_OUT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAIT_UART;
      ticks <= '0;
      data  <= '0;
    end else begin
      unique case (state)
        WAIT_UART: if (start_seen) begin
          state <= READY;
          ticks <= '0;
        end
        READY: if (tick) begin
          ticks <= ticks + 1'b1;
          if (ticks == 5'd0 && rx_s)                 // start bit too short
            state <= WAIT_UART;
          else if (ticks[0] == 1'b0 && ticks >= 5'd2 && ticks <= 5'd16)
            data <= {rx_s, data[7:1]};               // middle of a data bit
          else if (ticks == 5'd18)
            state <= rx_s ? DATA_OUT : WAIT_UART;    // stop bit
        end
        DATA_OUT: if (rd_ack) state <= WAIT_UART;
        default:  state <= WAIT_UART;
      endcase
    end
  end

  // The byte must not change while it is offered.
  a_data_stable: assert property (@(posedge clk) disable iff (rst)
    rd_req && !rd_ack |=> $stable(data));

endmodule
