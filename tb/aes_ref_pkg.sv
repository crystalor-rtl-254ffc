// aes_ref_pkg: reference AES-128 encryption for testbenches.
//
// Written independently of the RTL: the S-box inverse is found by searching
// all 256 candidates with a bitwise carry-less multiply, the key schedule is
// the FIPS-197 word recurrence over w[0..43], and the state is held as a
// 4x4 byte matrix. Slow, but only used to produce expected values.
package aes_ref_pkg;

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p = p ^ (15'(a) << i);
    for (int i = 14; i >= 8; i--) if (p[i]) p = p ^ (15'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int c = 1; c < 256; c++) if (ref_mul(a, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1'b1);
    return s;
  endfunction

  function automatic logic [127:0] ref_aes(input logic [127:0] key, input logic [127:0] pt);
    logic [31:0] w [0:43];
    logic [7:0]  s [0:3][0:3];
    logic [7:0]  t [0:3][0:3];
    logic [31:0] tmp;
    logic [7:0]  rc;
    logic [127:0] out;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      tmp = w[i-1];
      if (i % 4 == 0) begin
        tmp = {ref_sbox(tmp[23:16]), ref_sbox(tmp[15:8]), ref_sbox(tmp[7:0]), ref_sbox(tmp[31:24])};
        tmp[31:24] = tmp[31:24] ^ rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ tmp;
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = pt[127-8*(4*c+r) -: 8] ^ w[c][31-8*r -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          t[r][c] = ref_sbox(s[r][(c+r)%4]);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          if (rnd != 10)
            s[r][c] = ref_mul(8'h02, t[r][c]) ^ ref_mul(8'h03, t[(r+1)%4][c]) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
          else
            s[r][c] = t[r][c];
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          s[r][c] = s[r][c] ^ w[4*rnd+c][31-8*r -: 8];
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out[127-8*(4*c+r) -: 8] = s[r][c];
    return out;
  endfunction

  // Reference i*L in GF(2^128), polynomial x^128+x^7+x^2+x+1: bit-serial
  // multiply, most significant index bit first (Horner form).
  function automatic logic [127:0] ref_gfmul_idx(input logic [63:0] i, input logic [127:0] l);
    logic [127:0] acc;
    acc = '0;
    for (int b = 63; b >= 0; b--) begin
      acc = {acc[126:0], 1'b0} ^ (acc[127] ? 128'h87 : 128'h0);
      if (i[b]) acc = acc ^ l;
    end
    return acc;
  endfunction

endpackage
