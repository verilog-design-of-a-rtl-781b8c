// aes_ref_pkg: behavioural AES reference for the testbenches, written
// straight from the FIPS-197 definitions and independent of the RTL
// structure. The S-box is computed from its definition: the multiplicative
// inverse is found by exhaustive search with a shift-and-add GF(2^8)
// multiplier, then the affine transform is applied. Blocks and keys use the
// byte order of the RTL (byte 0 is the most significant).
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 8'h00;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    for (int b = 1; b < 256; b++)
      if (gmul(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  function automatic logic [7:0] sbox_calc(logic [7:0] a);
    logic [7:0] b = ginv(a);
    logic [7:0] c63 = 8'h63;
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c63[i];
    return r;
  endfunction

  // Tables filled from the definitions on first use.
  logic [7:0] sbox_t [256];
  logic [7:0] inv_sbox_t [256];
  bit         tables_ready = 1'b0;

  function automatic void build_tables();
    for (int b = 0; b < 256; b++) begin
      sbox_t[b] = sbox_calc(8'(b));
      inv_sbox_t[sbox_t[b]] = 8'(b);
    end
    tables_ready = 1'b1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    if (!tables_ready) build_tables();
    return sbox_t[a];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] a);
    if (!tables_ready) build_tables();
    return inv_sbox_t[a];
  endfunction

  function automatic logic [7:0] get_byte(logic [127:0] s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] sub_shift(logic [127:0] s, bit dec);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = dec ? inv_sbox(get_byte(s, r, (c + 4 - r) % 4))
                                        : sbox(get_byte(s, r, (c + r) % 4));
    return o;
  endfunction

  function automatic logic [31:0] mix_word(logic [31:0] w, bit dec);
    logic [7:0] a [4];
    logic [31:0] o;
    for (int r = 0; r < 4; r++) a[r] = w[31 - 8*r -: 8];
    for (int r = 0; r < 4; r++)
      o[31 - 8*r -: 8] = dec ?
        gmul(8'h0e, a[r]) ^ gmul(8'h0b, a[(r+1)%4]) ^ gmul(8'h0d, a[(r+2)%4]) ^ gmul(8'h09, a[(r+3)%4]) :
        gmul(8'h02, a[r]) ^ gmul(8'h03, a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

  function automatic logic [127:0] mix(logic [127:0] s, bit dec);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_word(s[127 - 32*c -: 32], dec);
    return o;
  endfunction

  typedef logic [31:0] words_t [60];

  // Key schedule; aes128 selects Nk=4 with the key in key[255:128].
  function automatic words_t expand(logic [255:0] key, bit aes128);
    words_t w;
    int nk = aes128 ? 4 : 8;
    int nw = aes128 ? 44 : 60;
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 60; i++) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < nw; i++) begin
      logic [31:0] t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk == 8 && i % nk == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] round_key(words_t w, int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key, bit aes128);
    words_t w = expand(key, aes128);
    int nr = aes128 ? 10 : 14;
    logic [127:0] s = pt ^ round_key(w, 0);
    for (int r = 1; r < nr; r++) s = mix(sub_shift(s, 0), 0) ^ round_key(w, r);
    return sub_shift(s, 0) ^ round_key(w, nr);
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [255:0] key, bit aes128);
    words_t w = expand(key, aes128);
    int nr = aes128 ? 10 : 14;
    logic [127:0] s = ct ^ round_key(w, nr);
    for (int r = nr - 1; r > 0; r--) s = mix(sub_shift(s, 1) ^ round_key(w, r), 1);
    return sub_shift(s, 1) ^ round_key(w, 0);
  endfunction

endpackage
