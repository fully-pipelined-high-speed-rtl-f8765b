// aes_pkg: types and Galois-field helpers shared by the time-shared SubBytes /
// MixColumns datapath.
//
// State layout: a 128-bit AES block is sixteen bytes b0..b15, b0 in bits
// [127:120]. Byte bk is state element (row k%4, column k/4), the usual
// column-major AES convention, so a state is also four 32-bit columns, column 0
// in bits [127:96] with its row 0 byte on top.
//
// The Galois-field helpers are written for the composite-field S-box
// (GF(2^4) on x^4 + x + 1) and for MixColumns (xtime in GF(2^8) on
// x^8 + x^4 + x^3 + x + 1). The byte layout and the field moduli are those of
// the AES standard; gathering them in one package is this design's own choice.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nibble_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [3:0]   slot_t;   // time slot = byte index 0..15 of a state

  // byte k of a block, b0 being the most significant
  function automatic byte_t get_byte(block_t b, int k);
    return b[127-8*k -: 8];
  endfunction

  // 8x8 GF(2) matrix times vector, rows given as bit masks
  function automatic byte_t gf2_matvec(byte_t rows [8], byte_t x);
    byte_t r;
    for (int i = 0; i < 8; i++) r[i] = ^(rows[i] & x);
    return r;
  endfunction

  // multiplication in GF(2^4) modulo x^4 + x + 1
  function automatic nibble_t gf16_mul(nibble_t a, nibble_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic nibble_t gf16_sq(nibble_t a);
    return gf16_mul(a, a);
  endfunction

  // inverse in GF(2^4) as a 16-entry function (0 maps to 0)
  function automatic nibble_t gf16_inv(nibble_t a);
    case (a)
      4'h0: return 4'h0;  4'h1: return 4'h1;  4'h2: return 4'h9;  4'h3: return 4'hE;
      4'h4: return 4'hD;  4'h5: return 4'hB;  4'h6: return 4'h7;  4'h7: return 4'h6;
      4'h8: return 4'hF;  4'h9: return 4'h2;  4'hA: return 4'hC;  4'hB: return 4'h5;
      4'hC: return 4'hA;  4'hD: return 4'h4;  4'hE: return 4'h3;  default: return 4'h8;
    endcase
  endfunction

  // AES affine transformation without its constant: b_i ^ b_{i+4} ^ .. ^ b_{i+7}
  function automatic byte_t affine_lin(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r;
  endfunction

  // inverse of affine_lin: b_{i+2} ^ b_{i+5} ^ b_{i+7}
  function automatic byte_t inv_affine_lin(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r;
  endfunction

  // multiplication by {02} in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

endpackage
