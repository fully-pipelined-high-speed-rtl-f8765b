// aes_ref_pkg: plain reference model of the AES operations the testbenches
// check against. Everything here is computed the textbook way, independently
// of the RTL: the S-box as the brute-force multiplicative inverse modulo
// x^8+x^4+x^3+x+1 followed by the affine map written with rotations, ShiftRows
// and MixColumns on a 4x4 byte array.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, aa;
    p = 0; aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1B) : (aa << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    if (a == 0) return 0;
    for (int b = 1; b < 256; b++)
      if (gmul(a, 8'(b)) == 8'h01) return 8'(b);
    return 0;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox_ref(logic [7:0] a);
    logic [7:0] b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox_ref(logic [7:0] a);
    logic [7:0] b;
    b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return ginv(b);
  endfunction

  // s[r][c] <-> block byte 4c + r, byte 0 in [127:120]
  function automatic logic [7:0] bget(logic [127:0] blk, int r, int c);
    return blk[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] shiftrows_ref(logic [127:0] s);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = bget(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic logic [127:0] subbytes_ref(logic [127:0] s);
    logic [127:0] o;
    for (int k = 0; k < 16; k++) o[127 - 8*k -: 8] = sbox_ref(s[127 - 8*k -: 8]);
    return o;
  endfunction

  function automatic logic [31:0] mixcol_ref(logic [31:0] col);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {gmul(a0, 2) ^ gmul(a1, 3) ^ a2 ^ a3,
            a0 ^ gmul(a1, 2) ^ gmul(a2, 3) ^ a3,
            a0 ^ a1 ^ gmul(a2, 2) ^ gmul(a3, 3),
            gmul(a0, 3) ^ a1 ^ a2 ^ gmul(a3, 2)};
  endfunction

  function automatic logic [127:0] mixcolumns_ref(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mixcol_ref(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // what the SB/MC stage computes: MixColumns(ShiftRows(SubBytes(s ^ k)))
  function automatic logic [127:0] stage_ref(logic [127:0] s, logic [127:0] k);
    return mixcolumns_ref(shiftrows_ref(subbytes_ref(s ^ k)));
  endfunction

  // AES-128 key expansion: round keys 0..10, each in the block layout
  typedef logic [127:0] rkeys_t [11];

  function automatic rkeys_t key_expand(logic [127:0] key);
    rkeys_t     rk;
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_ref(t[31:24]), sbox_ref(t[23:16]), sbox_ref(t[15:8]), sbox_ref(t[7:0])};
        t[31:24] ^= rcon;
        rcon = gmul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] aes128_encrypt_ref(logic [127:0] pt, logic [127:0] key);
    rkeys_t       rk;
    logic [127:0] s;
    rk = key_expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r < 10; r++) s = mixcolumns_ref(shiftrows_ref(subbytes_ref(s))) ^ rk[r];
    return shiftrows_ref(subbytes_ref(s)) ^ rk[10];
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
