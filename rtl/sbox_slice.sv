// sbox_slice: one isolated S-box copy of the measurement array.
//
// The plaintext byte is captured in an input register only while this copy
// is enabled and the measurement trigger is high; the combinational AES
// S-box sits between that register and an output register that captures the
// result when en2 is high. The two registers keep the S-box quiet except in
// the measurement window, so the supply current seen while the trigger is
// high comes from the S-box switching. A disabled copy also clears its output
// register, so that it contributes zero to the XOR check (own choice).
//
// Interface: en, trigger, sbox_bits (8), en2 -> sbox_out (8).
// Timing: sbox_out = S(sbox_bits) one clock after an en2 cycle that follows a
// trigger cycle. Both registers reset to zero.
module sbox_slice
  import cpa_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  trigger,
  input  byte_t sbox_bits,
  input  logic  en2,
  output byte_t sbox_out
);

  byte_t in_q, s;

  always_ff @(posedge clk) begin
    if (rst)                  in_q <= '0;
    else if (en && trigger)   in_q <= sbox_bits;
  end

  aes_sbox u_sbox (.in_byte(in_q), .out_byte(s));

  always_ff @(posedge clk) begin
    if (rst || !en) sbox_out <= '0;
    else if (en2)   sbox_out <= s;
  end

endmodule
