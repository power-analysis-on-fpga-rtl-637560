// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL. The S-box reference finds the inverse by search
// and applies the affine map bit by bit (FIPS-197 form); the LFSR reference
// uses the bit equation new = s7 ^ s6 ^ s5 ^ s2.
package tb_ref_pkg;

  function automatic logic [7:0] xtime(logic [7:0] a);
    return (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    while (b != 0) begin
      if (b[0]) r = r ^ a;
      a = xtime(a);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 0, s;
    logic [7:0] C = 8'h63;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ C[i];
    return s;
  endfunction

  function automatic logic [7:0] ref_lfsr(logic [7:0] s);
    return {s[6:0], s[7] ^ s[6] ^ s[5] ^ s[2]};
  endfunction

endpackage
