// cpa_pkg: command codes, widths and helper functions shared by the
// power-analysis experiment platform.
//
// A command byte from the host carries a 3-bit command code in bits 7:5 and
// 5 parameter bits in bits 4:0. The four codes below are the ones the design
// defines; codes 100-111 are reserved and are ignored by the controller. The
// split of the byte into command and parameter fields is this design's choice.
package cpa_pkg;

  localparam int unsigned BYTE_W  = 8;
  localparam int unsigned CMD_W   = 3;
  localparam int unsigned PARAM_W = 5;
  localparam int unsigned SEED_W  = 4;
  localparam int unsigned EN_W    = 32;   // one enable bit per S-box copy

  typedef logic [BYTE_W-1:0] byte_t;

  typedef enum logic [CMD_W-1:0] {
    CMD_SET_LSB  = 3'b000,   // seed -> LFSR bits 3:0
    CMD_SET_MSB  = 3'b001,   // seed -> LFSR bits 7:4
    CMD_SET_SBOX = 3'b010,   // number of active S-boxes
    CMD_MEASURE  = 3'b011    // run one measurement, answer with the XOR result
  } cmd_e;

  typedef struct packed {
    logic [CMD_W-1:0]   cmd;
    logic [PARAM_W-1:0] param;
  } cmd_byte_t;

  // Feedback taps of the 8-bit plaintext LFSR (bits 7, 6, 5 and 2, XOR).
  localparam byte_t LFSR_TAPS = 8'b1110_0100;

  // Next LFSR state: shift left, new bit enters at bit 0.
  function automatic byte_t lfsr_next(byte_t s);
    return {s[BYTE_W-2:0], ^(s & LFSR_TAPS)};
  endfunction

  // GF(2^8) multiplication modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // AES S-box: multiplicative inverse (x^254, zero maps to zero) followed by
  // the affine transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
  function automatic byte_t sbox_f(byte_t a);
    byte_t sq, inv, b;
    // x^254 = x^2 * x^4 * x^8 * x^16 * x^32 * x^64 * x^128
    sq  = gf_mul(a, a);
    inv = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gf_mul(sq, sq);
      inv = gf_mul(inv, sq);
    end
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

endpackage
