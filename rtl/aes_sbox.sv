// aes_sbox: the AES SubBytes substitution for one byte, built as
// combinational logic rather than a 256-entry table.
//
// The byte is inverted in GF(2^8) (modulus x^8+x^4+x^3+x+1, zero maps to
// zero) by raising it to the power 254 with a chain of squarings and
// multiplications, and the result goes through the AES affine transform with
// constant 0x63. Synthesis reduces the chain to plain gates. Building the
// S-box as logic instead of a ROM follows the design; the particular
// inversion method is this implementation's choice.
//
// Interface: in_byte (8) -> out_byte (8). Purely combinational, no clock.
module aes_sbox
  import cpa_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  always_comb out_byte = sbox_f(in_byte);

endmodule
