// aes_pkg: types, constants and GF arithmetic shared by the AES-128 blocks.
//
// Data layout: a 32-bit word holds one state column, row 0 in bits [31:24]
// and row 3 in bits [7:0]; a 128-bit block holds columns 0..3 with column 0
// in bits [127:96]. This is the byte order of FIPS-197, so a block reads as
// the usual hex string.
//
// The S-box arithmetic follows the composite-field method: a GF(2^8) byte D
// (polynomial basis, m(x) = x^8+x^4+x^3+x+1) is mapped by the 8x8 bit matrix T
// to A = p*x + q in GF((2^4)^2) with w(x) = x^2 + x + beta^14, where p and q are
// GF(16) nibbles under I(x) = x^4 + x + 1 and beta = {2}, so beta^14 = {9}.
// The GF(16) inverse is a 16-entry truth table. T, T^-1, the composite
// inversion formulas and the affine constants {1F}/{63} are the method's own;
// the inverse affine constants {4A}/{05} follow from them (the inverse of
// multiplying by {1F} modulo x^8+1, and {4A}*{63} = {05}).
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Enc/Dec select: 0 enciphers, 1 deciphers.
  typedef enum logic { MODE_ENC = 1'b0, MODE_DEC = 1'b1 } mode_e;

  localparam int unsigned NUM_ROUNDS = 10;   // AES-128

  // Field mapping matrices. Entry [i] is row i; bit j of a row multiplies
  // input bit j (bit 0 = least significant bit, the upper-left entry).
  localparam byte_t T_MAT [8] = '{
    8'b1101_1101, 8'b0000_1010, 8'b0101_0010, 8'b1100_0110,
    8'b0111_0000, 8'b1101_0010, 8'b1010_1100, 8'b1010_0000 };
  localparam byte_t T_INV_MAT [8] = '{
    8'b0101_0001, 8'b1011_0000, 8'b0111_0010, 8'b1011_0010,
    8'b0101_1010, 8'b1010_0100, 8'b1110_1110, 8'b0010_0100 };

  localparam logic [3:0] BETA14 = 4'h9;

  // Multiply a bit vector by a GF(2) matrix.
  function automatic byte_t mat_mul(input byte_t m [8], input byte_t d);
    byte_t r;
    for (int i = 0; i < 8; i++) r[i] = ^(m[i] & d);
    return r;
  endfunction

  function automatic byte_t map_to_composite(input byte_t d);
    return mat_mul(T_MAT, d);
  endfunction

  function automatic byte_t map_from_composite(input byte_t a);
    return mat_mul(T_INV_MAT, a);
  endfunction

  // GF(16) multiply modulo x^4 + x + 1.
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] gf16_sq(input logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  // GF(16) inverse as a truth table; {0} maps to itself.
  function automatic logic [3:0] gf16_inv(input logic [3:0] a);
    case (a)
      4'h0: return 4'h0;  4'h1: return 4'h1;  4'h2: return 4'h9;  4'h3: return 4'he;
      4'h4: return 4'hd;  4'h5: return 4'hb;  4'h6: return 4'h7;  4'h7: return 4'h6;
      4'h8: return 4'hf;  4'h9: return 4'h2;  4'ha: return 4'hc;  4'hb: return 4'h5;
      4'hc: return 4'ha;  4'hd: return 4'h4;  4'he: return 4'h3;  default: return 4'h8;
    endcase
  endfunction

  // Rotate a byte left by n (multiplication by x^n modulo x^8 + 1).
  function automatic byte_t rotl8(input byte_t b, input int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  // Affine step of eq. (1): delta*a mod (x^8+1) xor C, delta = {1F}, C = {63}.
  function automatic byte_t affine_fwd(input byte_t a);
    return a ^ rotl8(a, 1) ^ rotl8(a, 2) ^ rotl8(a, 3) ^ rotl8(a, 4) ^ 8'h63;
  endfunction

  // Inverse affine: {4A}*b mod (x^8+1) xor {05}.
  function automatic byte_t affine_inv(input byte_t b);
    return rotl8(b, 1) ^ rotl8(b, 3) ^ rotl8(b, 6) ^ 8'h05;
  endfunction

  // Multiply by {02} in GF(2^8).
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Multiply by x^-1 ({8D}) in GF(2^8); inverse of xtime.
  function automatic byte_t xtime_inv(input byte_t b);
    return b[0] ? ((b ^ 8'h1b) >> 1) | 8'h80 : b >> 1;
  endfunction

  // Rcon of the last AES-128 round, where the inverse schedule starts.
  localparam byte_t RCON_FIRST = 8'h01;
  localparam byte_t RCON_LAST  = 8'h36;

  function automatic byte_t get_byte(input word_t w, input int unsigned row);
    return w[31 - 8*row -: 8];
  endfunction

endpackage
