// lfsr: 8-bit linear-feedback shift register that supplies the plaintext.
//
// Each step shifts the state one place to the left and feeds the XOR of
// bits 7, 6, 5 and 2 into bit 0. A 4-bit seed can be written into the low
// half (load_lsb) or the high half (load_msb) of the state, so the host sets
// a full starting value with two commands. With the state 0x1E the sequence
// runs 0x1E, 0x3D, 0x7A, 0xF4, 0xE8, 0xD1, 0xA2, 0x44, ... and repeats after
// 63 steps. The left shift, the nibble seeding and this sequence follow the
// design; the tap positions are the ones that reproduce the sequence and
// keep every state on a cycle.
//
// Interface: load_lsb / load_msb with seed (4), step -> value (8).
// Timing: loads and steps take effect on the next clock edge; a load wins
// over a step. Reset state 0x01.
module lfsr
  import cpa_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load_lsb,
  input  logic              load_msb,
  input  logic [SEED_W-1:0] seed,
  input  logic              step,
  output byte_t             value
);

  always_ff @(posedge clk) begin
    if (rst)           value <= 8'h01;
    else if (load_lsb) value[3:0] <= seed;
    else if (load_msb) value[7:4] <= seed;
    else if (step)     value <= lfsr_next(value);
  end

endmodule
