// sbox_logic: N_SBOX parallel S-box copies and the XOR check behind them.
//
// All copies receive the same plaintext byte, trigger and en2; each has its
// own bit of the 32-bit enable vector, so the number of switching S-boxes,
// and with it the size of the data-dependent current, can be set at run
// time. Copies are made with a generate loop; the XOR input is one vector of
// N_SBOX bytes. Enable bits above N_SBOX-1 are unused.
//
// Interface: en (32), trigger, sbox_bits (8), en2 -> xor_result (8).
// Timing: as sbox_slice; xor_result is combinational from the output
// registers.
module sbox_logic
  import cpa_pkg::*;
#(
  parameter int unsigned N_SBOX = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [EN_W-1:0] en,
  input  logic            trigger,
  input  byte_t           sbox_bits,
  input  logic            en2,
  output byte_t           xor_result
);

  logic [N_SBOX*BYTE_W-1:0] outs;

  for (genvar i = 0; i < N_SBOX; i++) begin : g_sbox
    sbox_slice u_slice (
      .clk      (clk),
      .rst      (rst),
      .en       (en[i]),
      .trigger  (trigger),
      .sbox_bits(sbox_bits),
      .en2      (en2),
      .sbox_out (outs[i*BYTE_W +: BYTE_W])
    );
  end

  sbox_xor #(.N_SBOX(N_SBOX)) u_xor (.sbox_outs(outs), .xor_result(xor_result));

  initial assert (N_SBOX >= 1 && N_SBOX <= EN_W)
    else $error("N_SBOX must be between 1 and %0d", EN_W);

endmodule
