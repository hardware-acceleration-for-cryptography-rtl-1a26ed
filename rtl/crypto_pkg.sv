// crypto_pkg: constants and constant functions shared by the hotspot
// accelerators.
//
// The AES S-box and its inverse are not stored as literal tables; they are
// computed at elaboration time from their definition (multiplicative inverse
// in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the AES affine transform).
// The DES S-boxes, expansion and permutation tables and the MD5 sine
// constants and rotation amounts are the standard published values (FIPS 46-3
// and RFC 1321). MD5_T[i] = floor(2^32 * |sin(i+1)|).
//
// Every accelerator uses the same start/done handshake: a one-cycle start
// pulse latches the operands, done is a one-cycle pulse in the cycle the
// results become valid, and the results then stay stable until the next
// start. The number of cycles from start to done equals the number of FSM
// states the accelerator has.
package crypto_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [31:0] word_t;
  typedef byte_t sbox_t [256];

  // Unit select field (word address bits [15:12]) of crypto_accel_top
  typedef enum logic [3:0] {
    U_RSA_POWER   = 4'd0,
    U_SUBB_ENC    = 4'd1,   // SubBytes for AES encryption
    U_SUBB_DEC    = 4'd2,   // SubBytes for AES decryption (key expansion)
    U_INV_SUBB    = 4'd3,
    U_INV_MIXCOL  = 4'd4,
    U_BLOWFISH_F  = 4'd5,
    U_RC5_KEYXP   = 4'd6,
    U_DES_ROUND   = 4'd7,
    U_MD5_P       = 4'd8,
    U_IDEA_MUL    = 4'd9
  } unit_e;
  localparam int unsigned NUM_UNITS = 10;

  // ---------------------------------------------------------------- AES
  function automatic byte_t gf_xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = gf_xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 in GF(2^8) (and 0 maps to 0)
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t aes_affine(byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic sbox_t gen_aes_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[i] = aes_affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  function automatic sbox_t gen_aes_inv_sbox();
    sbox_t f = gen_aes_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  // ---------------------------------------------------------------- DES
  // Bit positions are numbered 1..n from the most significant bit, as in
  // the standard.
  localparam int unsigned DES_E [48] = '{
    32,1,2,3,4,5,4,5,6,7,8,9,8,9,10,11,12,13,12,13,14,15,16,17,
    16,17,18,19,20,21,20,21,22,23,24,25,24,25,26,27,28,29,28,29,30,31,32,1};

  localparam int unsigned DES_P [32] = '{
    16,7,20,21,29,12,28,17,1,15,23,26,5,18,31,10,
    2,8,24,14,32,27,3,9,19,13,30,6,22,11,4,25};

  // DES_S[box][row*16 + column], row = outer bits b5 b0, column = b4..b1
  localparam logic [3:0] DES_S [8][64] = '{
    '{14,4,13,1,2,15,11,8,3,10,6,12,5,9,0,7,0,15,7,4,14,2,13,1,10,6,12,11,9,5,3,8,
      4,1,14,8,13,6,2,11,15,12,9,7,3,10,5,0,15,12,8,2,4,9,1,7,5,11,3,14,10,0,6,13},
    '{15,1,8,14,6,11,3,4,9,7,2,13,12,0,5,10,3,13,4,7,15,2,8,14,12,0,1,10,6,9,11,5,
      0,14,7,11,10,4,13,1,5,8,12,6,9,3,2,15,13,8,10,1,3,15,4,2,11,6,7,12,0,5,14,9},
    '{10,0,9,14,6,3,15,5,1,13,12,7,11,4,2,8,13,7,0,9,3,4,6,10,2,8,5,14,12,11,15,1,
      13,6,4,9,8,15,3,0,11,1,2,12,5,10,14,7,1,10,13,0,6,9,8,7,4,15,14,3,11,5,2,12},
    '{7,13,14,3,0,6,9,10,1,2,8,5,11,12,4,15,13,8,11,5,6,15,0,3,4,7,2,12,1,10,14,9,
      10,6,9,0,12,11,7,13,15,1,3,14,5,2,8,4,3,15,0,6,10,1,13,8,9,4,5,11,12,7,2,14},
    '{2,12,4,1,7,10,11,6,8,5,3,15,13,0,14,9,14,11,2,12,4,7,13,1,5,0,15,10,3,9,8,6,
      4,2,1,11,10,13,7,8,15,9,12,5,6,3,0,14,11,8,12,7,1,14,2,13,6,15,0,9,10,4,5,3},
    '{12,1,10,15,9,2,6,8,0,13,3,4,14,7,5,11,10,15,4,2,7,12,9,5,6,1,13,14,0,11,3,8,
      9,14,15,5,2,8,12,3,7,0,4,10,1,13,11,6,4,3,2,12,9,5,15,10,11,14,1,7,6,0,8,13},
    '{4,11,2,14,15,0,8,13,3,12,9,7,5,10,6,1,13,0,11,7,4,9,1,10,14,3,5,12,2,15,8,6,
      1,4,11,13,12,3,7,14,10,15,6,8,0,5,9,2,6,11,13,8,1,4,10,7,9,5,0,15,14,2,3,12},
    '{13,2,8,4,6,15,11,1,10,9,3,14,5,0,12,7,1,15,13,8,10,3,7,4,12,5,6,11,0,14,9,2,
      7,11,4,1,9,12,14,2,0,6,10,13,15,3,5,8,2,1,14,7,4,10,8,13,15,12,9,0,3,5,6,11}};

  // ---------------------------------------------------------------- MD5
  localparam word_t MD5_T [64] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee, 32'hf57c0faf, 32'h4787c62a,
    32'ha8304613, 32'hfd469501, 32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be,
    32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821, 32'hf61e2562, 32'hc040b340,
    32'h265e5a51, 32'he9b6c7aa, 32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed, 32'ha9e3e905, 32'hfcefa3f8,
    32'h676f02d9, 32'h8d2a4c8a, 32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c,
    32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70, 32'h289b7ec6, 32'heaa127fa,
    32'hd4ef3085, 32'h04881d05, 32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039, 32'h655b59c3, 32'h8f0ccc92,
    32'hffeff47d, 32'h85845dd1, 32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1,
    32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391};

  // rotation amount of step i is MD5_ROT[i/16][i%4]
  localparam int unsigned MD5_ROT [4][4] = '{
    '{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};

  function automatic word_t rotl32(word_t x, logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction

endpackage
