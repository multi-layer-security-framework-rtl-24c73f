// Shared types, constants and pure functions of the AES-then-DES cipher chains.
//
// The AES S-box is not typed in as a table: it is computed at elaboration time from its
// definition (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the AES
// affine map with constant 0x63), and its inverse is derived from it. The DES bit-permutation
// tables (IP, P, PC-1, PC-2) and the standard DES S-boxes are those of FIPS 46-3; the final
// permutation is computed as the inverse of IP and the expansion E from its regular pattern.
//
// Bit numbering: a 128-bit block holds AES byte 0 in bits [127:120]; the AES state is filled
// column by column (state[r][c] = byte r+4c). DES tables count bit 1 as the MSB of the word,
// as FIPS 46-3 does. None of these functions have state; they are used inside always_comb
// logic and as constant functions.
package iov_pkg;

  typedef logic [127:0]      block128_t;
  typedef logic [63:0]       block64_t;
  typedef logic [7:0]        byte_t;
  typedef logic [10:0][127:0] aes_round_keys_t;  // round key 0 (the cipher key) .. 10

  // Where a DES S-box takes its entries from.
  typedef enum logic {
    SBOX_AES_DERIVED = 1'b0,  // one eighth of the AES S-box per DES S-box (the shared-table scheme)
    SBOX_DES_STANDARD = 1'b1  // the eight S-boxes of FIPS 46-3
  } des_sbox_src_e;

  // Slot j of the DES round function uses S-box table ORDER[j].
  typedef logic [7:0][2:0] sbox_order_t;
  localparam sbox_order_t SBOX_ORDER_FWD = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0};
  localparam sbox_order_t SBOX_ORDER_REV = {3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};

  // ------------------------------------------------------------------ GF(2^8) and the AES S-box
  function automatic byte_t gf_xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = gf_xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a = 0.
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r = 8'h01;
    for (int i = 7; i >= 0; i--) begin
      r = gf_mul(r, r);
      if (i != 0) r = gf_mul(r, a);
    end
    return r;
  endfunction

  function automatic byte_t aes_sbox_calc(input byte_t a);
    byte_t b = gf_inv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] aes_sbox_table();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = aes_sbox_calc(byte_t'(i));
    return t;
  endfunction

  function automatic logic [255:0][7:0] aes_inv_sbox_table();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[aes_sbox_calc(byte_t'(i))] = byte_t'(i);
    return t;
  endfunction

  localparam logic [255:0][7:0] AES_SBOX     = aes_sbox_table();
  localparam logic [255:0][7:0] AES_INV_SBOX = aes_inv_sbox_table();

  // ------------------------------------------------------------------ AES linear layers
  function automatic byte_t st_get(input block128_t s, input int r, input int c);
    return s[127 - 8 * (r + 4 * c) -: 8];
  endfunction

  function automatic block128_t aes_shift_rows(input block128_t s);
    block128_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8 * (r + 4 * c) -: 8] = st_get(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic block128_t aes_inv_shift_rows(input block128_t s);
    block128_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8 * (r + 4 * c) -: 8] = st_get(s, r, (c - r + 4) % 4);
    return o;
  endfunction

  function automatic block128_t aes_mix_columns(input block128_t s);
    block128_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = st_get(s, 0, c), a1 = st_get(s, 1, c), a2 = st_get(s, 2, c), a3 = st_get(s, 3, c);
      o[127 - 8 * (0 + 4 * c) -: 8] = gf_xtime(a0) ^ gf_xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127 - 8 * (1 + 4 * c) -: 8] = a0 ^ gf_xtime(a1) ^ gf_xtime(a2) ^ a2 ^ a3;
      o[127 - 8 * (2 + 4 * c) -: 8] = a0 ^ a1 ^ gf_xtime(a2) ^ gf_xtime(a3) ^ a3;
      o[127 - 8 * (3 + 4 * c) -: 8] = gf_xtime(a0) ^ a0 ^ a1 ^ a2 ^ gf_xtime(a3);
    end
    return o;
  endfunction

  function automatic block128_t aes_inv_mix_columns(input block128_t s);
    block128_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = st_get(s, 0, c), a1 = st_get(s, 1, c), a2 = st_get(s, 2, c), a3 = st_get(s, 3, c);
      o[127 - 8 * (0 + 4 * c) -: 8] = gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09);
      o[127 - 8 * (1 + 4 * c) -: 8] = gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d);
      o[127 - 8 * (2 + 4 * c) -: 8] = gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b);
      o[127 - 8 * (3 + 4 * c) -: 8] = gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e);
    end
    return o;
  endfunction

  // ------------------------------------------------------------------ DES tables (FIPS 46-3)
  localparam int unsigned DES_IP [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17, 9, 1, 59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7};
  localparam int unsigned DES_P [32] = '{
    16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
    2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25};
  localparam int unsigned DES_PC1 [56] = '{
    57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18,
    10, 2, 59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15, 7, 62, 54, 46, 38, 30, 22,
    14, 6, 61, 53, 45, 37, 29, 21, 13, 5, 28, 20, 12, 4};
  localparam int unsigned DES_PC2 [48] = '{
    14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10,
    23, 19, 12, 4, 26, 8, 16, 7, 27, 20, 13, 2,
    41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32};
  // Left rotations of C and D before each of the 16 encryption rounds.
  localparam int unsigned DES_SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};

  // Standard S-boxes, entry [box][16*row + column].
  localparam logic [3:0] DES_SBOX_STD [8][64] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7, 0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8,
      4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0, 15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13},
    '{15, 1, 8, 14, 6, 11, 3, 4, 9, 7, 2, 13, 12, 0, 5, 10, 3, 13, 4, 7, 15, 2, 8, 14, 12, 0, 1, 10, 6, 9, 11, 5,
      0, 14, 7, 11, 10, 4, 13, 1, 5, 8, 12, 6, 9, 3, 2, 15, 13, 8, 10, 1, 3, 15, 4, 2, 11, 6, 7, 12, 0, 5, 14, 9},
    '{10, 0, 9, 14, 6, 3, 15, 5, 1, 13, 12, 7, 11, 4, 2, 8, 13, 7, 0, 9, 3, 4, 6, 10, 2, 8, 5, 14, 12, 11, 15, 1,
      13, 6, 4, 9, 8, 15, 3, 0, 11, 1, 2, 12, 5, 10, 14, 7, 1, 10, 13, 0, 6, 9, 8, 7, 4, 15, 14, 3, 11, 5, 2, 12},
    '{7, 13, 14, 3, 0, 6, 9, 10, 1, 2, 8, 5, 11, 12, 4, 15, 13, 8, 11, 5, 6, 15, 0, 3, 4, 7, 2, 12, 1, 10, 14, 9,
      10, 6, 9, 0, 12, 11, 7, 13, 15, 1, 3, 14, 5, 2, 8, 4, 3, 15, 0, 6, 10, 1, 13, 8, 9, 4, 5, 11, 12, 7, 2, 14},
    '{2, 12, 4, 1, 7, 10, 11, 6, 8, 5, 3, 15, 13, 0, 14, 9, 14, 11, 2, 12, 4, 7, 13, 1, 5, 0, 15, 10, 3, 9, 8, 6,
      4, 2, 1, 11, 10, 13, 7, 8, 15, 9, 12, 5, 6, 3, 0, 14, 11, 8, 12, 7, 1, 14, 2, 13, 6, 15, 0, 9, 10, 4, 5, 3},
    '{12, 1, 10, 15, 9, 2, 6, 8, 0, 13, 3, 4, 14, 7, 5, 11, 10, 15, 4, 2, 7, 12, 9, 5, 6, 1, 13, 14, 0, 11, 3, 8,
      9, 14, 15, 5, 2, 8, 12, 3, 7, 0, 4, 10, 1, 13, 11, 6, 4, 3, 2, 12, 9, 5, 15, 10, 11, 14, 1, 7, 6, 0, 8, 13},
    '{4, 11, 2, 14, 15, 0, 8, 13, 3, 12, 9, 7, 5, 10, 6, 1, 13, 0, 11, 7, 4, 9, 1, 10, 14, 3, 5, 12, 2, 15, 8, 6,
      1, 4, 11, 13, 12, 3, 7, 14, 10, 15, 6, 8, 0, 5, 9, 2, 6, 11, 13, 8, 1, 4, 10, 7, 9, 5, 0, 15, 14, 2, 3, 12},
    '{13, 2, 8, 4, 6, 15, 11, 1, 10, 9, 3, 14, 5, 0, 12, 7, 1, 15, 13, 8, 10, 3, 7, 4, 12, 5, 6, 11, 0, 14, 9, 2,
      7, 11, 4, 1, 9, 12, 14, 2, 0, 6, 10, 13, 15, 3, 5, 8, 2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11}};

  // ------------------------------------------------------------------ DES permutations
  function automatic block64_t des_ip(input block64_t x);
    block64_t o;
    for (int i = 0; i < 64; i++) o[63 - i] = x[64 - DES_IP[i]];
    return o;
  endfunction

  // Final permutation = inverse of IP.
  function automatic block64_t des_fp(input block64_t x);
    block64_t o;
    for (int i = 0; i < 64; i++) o[64 - DES_IP[i]] = x[63 - i];
    return o;
  endfunction

  // Expansion E: group g of six bits takes input bits 4g .. 4g+5 (1-based, cyclic).
  function automatic logic [47:0] des_e(input logic [31:0] x);
    logic [47:0] o;
    for (int g = 0; g < 8; g++)
      for (int k = 0; k < 6; k++)
        o[47 - (6 * g + k)] = x[31 - ((4 * g + k + 31) % 32)];
    return o;
  endfunction

  function automatic logic [31:0] des_p(input logic [31:0] x);
    logic [31:0] o;
    for (int i = 0; i < 32; i++) o[31 - i] = x[32 - DES_P[i]];
    return o;
  endfunction

  function automatic logic [55:0] des_pc1(input block64_t k);
    logic [55:0] o;
    for (int i = 0; i < 56; i++) o[55 - i] = k[64 - DES_PC1[i]];
    return o;
  endfunction

  function automatic logic [47:0] des_pc2(input logic [55:0] cd);
    logic [47:0] o;
    for (int i = 0; i < 48; i++) o[47 - i] = cd[56 - DES_PC2[i]];
    return o;
  endfunction

  // Rotate both 28-bit halves of {C, D} by n places, n being 1 or 2 (the only DES shifts).
  function automatic logic [55:0] des_rotl(input logic [55:0] cd, input int unsigned n);
    logic [27:0] c = cd[55:28], d = cd[27:0];
    if (n == 2) return {c[25:0], c[27:26], d[25:0], d[27:26]};
    else        return {c[26:0], c[27], d[26:0], d[27]};
  endfunction

  function automatic logic [55:0] des_rotr(input logic [55:0] cd, input int unsigned n);
    logic [27:0] c = cd[55:28], d = cd[27:0];
    if (n == 2) return {c[1:0], c[27:2], d[1:0], d[27:2]};
    else        return {c[0], c[27:1], d[0], d[27:1]};
  endfunction

endpackage
