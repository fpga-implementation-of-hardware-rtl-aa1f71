// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written straight from the AES definition, with none of the datapath's
// structure: GF(2^8) products by shift-and-add, the S-box by searching
// for the multiplicative inverse and applying the affine map, and a
// round-by-round cipher with an expanded key schedule. Byte order is
// FIPS-197: byte 0 in bits 127:120.
package aes_ref_pkg;

  function automatic logic [7:0] ref_xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] ref_gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] acc = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= a;
      a = ref_xtime(a);
    end
    return acc;
  endfunction

  function automatic logic [3:0] ref_gmul4(logic [3:0] a, logic [3:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (p[i]) p ^= 8'h13 << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 8'h00;
    logic [7:0] y;
    for (int c = 1; c < 256; c++)
      if (ref_gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] s);
    for (int b = 0; b < 16; b++) s[8*b +: 8] = ref_sbox(s[8*b +: 8]);
    return s;
  endfunction

  // Byte at row r, column c.
  function automatic logic [7:0] ref_rc(logic [127:0] s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = ref_rc(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic logic [31:0] ref_mix_column(logic [31:0] col);
    logic [7:0] a [4];
    logic [31:0] o;
    for (int r = 0; r < 4; r++) a[r] = col[31 - 8*r -: 8];
    o[31:24] = ref_gmul(a[0], 8'h02) ^ ref_gmul(a[1], 8'h03) ^ a[2] ^ a[3];
    o[23:16] = a[0] ^ ref_gmul(a[1], 8'h02) ^ ref_gmul(a[2], 8'h03) ^ a[3];
    o[15:8]  = a[0] ^ a[1] ^ ref_gmul(a[2], 8'h02) ^ ref_gmul(a[3], 8'h03);
    o[7:0]   = ref_gmul(a[0], 8'h03) ^ a[1] ^ a[2] ^ ref_gmul(a[3], 8'h02);
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] s);
    for (int c = 0; c < 4; c++) s[127 - 32*c -: 32] = ref_mix_column(s[127 - 32*c -: 32]);
    return s;
  endfunction

  // All eleven round keys, round i in bits [128*i +: 128].
  function automatic logic [11*128-1:0] ref_key_schedule(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rcon = 8'h01;
    logic [11*128-1:0] rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rcon;
        rcon = ref_xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[128*r +: 128] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [11*128-1:0] rk = ref_key_schedule(key);
    logic [127:0] s = pt ^ key;
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s ^= rk[128*r +: 128];
    end
    return s;
  endfunction

endpackage
