// aes_pkg: AES-128 building blocks used by the PXOR-Hash engine.
//
// All functions are pure combinational helpers for the FIPS-197 cipher. The
// S-box is computed, not tabulated: the multiplicative inverse in GF(2^8)
// (field polynomial x^8+x^4+x^3+x+1) is formed as a^254 by a short
// square-and-multiply chain, followed by the standard affine map with 0x63.
// Byte n of a 128-bit block sits at bits [127-8n -: 8], so byte 0 is the
// most significant byte, and the state is column major (byte = row + 4*col).
package aes_pkg;

  typedef logic [127:0] block_t;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Shift-and-add multiply, written out so that no loop has to be unrolled.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] a1, a2, a3, a4, a5, a6, a7;
    a1 = xtime(a);
    a2 = xtime(a1);
    a3 = xtime(a2);
    a4 = xtime(a3);
    a5 = xtime(a4);
    a6 = xtime(a5);
    a7 = xtime(a6);
    return ({8{b[0]}} & a)  ^ ({8{b[1]}} & a1) ^ ({8{b[2]}} & a2) ^ ({8{b[3]}} & a3) ^
           ({8{b[4]}} & a4) ^ ({8{b[5]}} & a5) ^ ({8{b[6]}} & a6) ^ ({8{b[7]}} & a7);
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] a2, a3, a12, a15, a240, a252;
    a2   = gf_mul(a, a);
    a3   = gf_mul(a2, a);
    a12  = gf_mul(gf_mul(a3, a3), gf_mul(a3, a3));
    a15  = gf_mul(a12, a3);
    a240 = gf_mul(a15, a15);
    a240 = gf_mul(a240, a240);
    a240 = gf_mul(a240, a240);
    a240 = gf_mul(a240, a240);
    a252 = gf_mul(a240, a12);
    return gf_mul(a252, a2);
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] v;
    v = gf_inv(a);
    return v ^ rotl8(v, 1) ^ rotl8(v, 2) ^ rotl8(v, 3) ^ rotl8(v, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] get_byte(input block_t b, input int n);
    return b[127-8*n -: 8];
  endfunction

  function automatic block_t sub_shift(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*c) -: 8] = sbox(get_byte(s, r + 4*((c + r) % 4)));
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2);
      a3 = get_byte(s, 4*c+3);
      o[127-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Round constant of round r (1..10).
  function automatic logic [7:0] rcon(input int r);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  // AES-128 key schedule step: round key r from round key r-1.
  function automatic block_t next_round_key(input block_t k, input logic [7:0] rc);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96];
    w1 = k[95:64];
    w2 = k[63:32];
    w3 = k[31:0];
    t  = {sbox(w3[23:16]) ^ rc, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
