// uart: receiver and transmitter side by side, each with its own baud
// generator, behind the two hand-shakes the controller uses.
//
// Receive side: rd_req/rd_ack with the byte on data_in. Transmit side:
// wr_req/wr_ack with the byte on data_out. The two directions are
// independent and may run at the same time. The split into a receive and a
// transmit unit under one wrapper follows the design.
module uart
  import cpa_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 115_200
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rx,
  output logic  tx,
  output byte_t data_in,
  output logic  rd_req,
  input  logic  rd_ack,
  input  byte_t data_out,
  input  logic  wr_req,
  output logic  wr_ack
);

  uart_rx #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD(BAUD)) u_rx (
    .clk(clk), .rst(rst), .rx(rx), .rd_req(rd_req), .rd_ack(rd_ack), .data(data_in));

  uart_tx #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD(BAUD)) u_tx (
    .clk(clk), .rst(rst), .wr_req(wr_req), .wr_ack(wr_ack), .data(data_out), .tx(tx));

endmodule
