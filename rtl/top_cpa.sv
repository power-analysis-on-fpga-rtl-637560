// top_cpa: FPGA platform for correlation power analysis of the AES S-box.
//
// A host drives the platform over a serial line with one-byte commands. The
// controller seeds an 8-bit LFSR that supplies plaintext bytes, chooses how
// many of the N_SBOX parallel S-box copies switch, and on a measurement
// command raises 'trigger' for the oscilloscope while the enabled copies
// substitute the current plaintext, then sends back the XOR of the copies'
// outputs as a health check. The external reset is synchronised by two
// flip-flops. The block structure, command set and baud rate follow the
// design; the 50 MHz clock default is that of the usual board for it.
//
// Ports: clk, reset (active high, asynchronous), rx/tx (8N1 at BAUD),
// trigger (high for the two clock cycles of the S-box evaluation).
module top_cpa
  import cpa_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned N_SBOX      = 32
) (
  input  logic clk,
  input  logic reset,
  input  logic rx,
  output logic tx,
  output logic trigger
);

  logic            rst;
  byte_t           data_in, data_out, sbox_bits, xor_result;
  logic            rd_req, rd_ack, wr_req, wr_ack, en2;
  logic [EN_W-1:0] en;

  reset_sync #(.STAGES(2)) u_rst (.clk(clk), .rst_in(reset), .rst_out(rst));

  uart #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD(BAUD)) u_uart (
    .clk(clk), .rst(rst), .rx(rx), .tx(tx),
    .data_in(data_in), .rd_req(rd_req), .rd_ack(rd_ack),
    .data_out(data_out), .wr_req(wr_req), .wr_ack(wr_ack));

  ctrl #(.N_EN(EN_W)) u_ctrl (
    .clk(clk), .rst(rst),
    .data_in(data_in), .rd_req(rd_req), .rd_ack(rd_ack),
    .data_out(data_out), .wr_req(wr_req), .wr_ack(wr_ack),
    .trigger(trigger), .en(en), .en2(en2), .sbox_bits(sbox_bits),
    .xor_result(xor_result));

  sbox_logic #(.N_SBOX(N_SBOX)) u_sbox (
    .clk(clk), .rst(rst), .en(en), .trigger(trigger), .sbox_bits(sbox_bits),
    .en2(en2), .xor_result(xor_result));

endmodule
