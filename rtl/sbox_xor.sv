// sbox_xor: reduces the outputs of all S-box copies to one byte by XOR.
//
// Every active copy computes the same byte, so the XOR is zero for an even
// number of active copies and equals the S-box value for an odd number;
// anything else shows a faulty copy. The host compares the returned byte
// with the value expected for the chosen number of copies. The input is one
// flat vector whose length follows N_SBOX, as in the design.
//
// Interface: sbox_outs (N_SBOX*8, copy i in bits 8i+7:8i) -> xor_result (8).
// Purely combinational.
module sbox_xor
  import cpa_pkg::*;
#(
  parameter int unsigned N_SBOX = 32
) (
  input  logic [N_SBOX*BYTE_W-1:0] sbox_outs,
  output byte_t                    xor_result
);

  always_comb begin
    xor_result = '0;
    for (int i = 0; i < N_SBOX; i++)
      xor_result ^= sbox_outs[i*BYTE_W +: BYTE_W];
  end

endmodule
