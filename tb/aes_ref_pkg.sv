// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written from the FIPS-197 definitions without any of the RTL's code: the
// S-box inverse is found by exhaustive search over GF(2^8) products, the
// affine transform is evaluated bit by bit from its defining equation, and
// the key schedule follows the word recurrence. Byte 0 of a state is bits
// 127:120. Not synthesizable; simulation only.
package aes_ref_pkg;

  bit        sbox_ready = 0;
  bit [7:0]  sbox_tab [256];

  function automatic bit [7:0] ref_gmul(bit [7:0] a, bit [7:0] b);
    bit [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void ref_build();
    for (int x = 0; x < 256; x++) begin
      bit [7:0] inv = 0, s;
      for (int y = 1; y < 256; y++) if (ref_gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
      sbox_tab[x] = s;
    end
    sbox_ready = 1;
  endfunction

  function automatic bit [7:0] ref_sbox(bit [7:0] x);
    if (!sbox_ready) ref_build();
    return sbox_tab[x];
  endfunction

  function automatic bit [7:0] get_b(bit [127:0] s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic bit [127:0] ref_subbytes(bit [127:0] s);
    bit [127:0] o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = ref_sbox(get_b(s, i));
    return o;
  endfunction

  // state byte (row r, column c) is byte 4c + r
  function automatic bit [127:0] ref_shiftrows(bit [127:0] s);
    bit [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_b(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic bit [127:0] ref_mixcolumns(bit [127:0] s);
    bit [127:0] o;
    bit [7:0] m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        bit [7:0] acc = 0;
        for (int k = 0; k < 4; k++) acc ^= ref_gmul(m[r][k], get_b(s, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  // next round key from the previous one; rnd = 1..10
  function automatic bit [127:0] ref_next_key(bit [127:0] k, int rnd);
    bit [31:0] w [8];
    bit [31:0] t;
    bit [7:0]  rc = 8'h01;
    for (int i = 1; i < rnd; i++) rc = ref_gmul(rc, 8'h02);
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {w[3][23:0], w[3][31:24]};
    t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
    t[31:24] ^= rc;
    w[4] = w[0] ^ t;
    for (int i = 5; i < 8; i++) w[i] = w[i-4] ^ w[i-1];
    return {w[4], w[5], w[6], w[7]};
  endfunction

  function automatic bit [127:0] ref_round(bit [127:0] s, bit [127:0] rk, bit final_round);
    bit [127:0] t = ref_shiftrows(ref_subbytes(s));
    if (!final_round) t = ref_mixcolumns(t);
    return t ^ rk;
  endfunction

  function automatic bit [127:0] ref_encrypt(bit [127:0] pt, bit [127:0] key);
    bit [127:0] s = pt ^ key;
    bit [127:0] k = key;
    for (int r = 1; r <= 10; r++) begin
      k = ref_next_key(k, r);
      s = ref_round(s, k, r == 10);
    end
    return s;
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
