// baud_gen: clock divider for the UART.
//
// Produces a one-cycle tick at twice the baud rate, so a receiver can wait
// half a bit after the start edge and then sample every bit in its middle.
// The divider is CLK_FREQ_HZ / (2*BAUD), rounded to the nearest integer
// (217 for 50 MHz and 115200 baud). 'restart' clears the count so the first
// tick comes exactly half a bit later; the receiver uses it on a start edge
// and the transmitter at the start of a frame.
//
// Interface: restart -> tick. Timing: tick every DIV cycles, first tick DIV
// cycles after the restart cycle.
module baud_gen #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 115_200
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,
  output logic tick
);

  localparam int unsigned DIV = (CLK_FREQ_HZ + BAUD) / (2 * BAUD);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || restart)                cnt <= '0;
    else if (cnt == CW'(DIV - 1))      cnt <= '0;
    else                               cnt <= cnt + 1'b1;
  end

  assign tick = !restart && (cnt == CW'(DIV - 1));

  initial assert (DIV >= 2) else $error("clock too slow for the baud rate");

endmodule
