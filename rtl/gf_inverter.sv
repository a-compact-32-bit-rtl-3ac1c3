// gf_inverter: multiplicative inverse in GF(2^8) (AES field), {00} -> {00}.
//
// Purely combinational. The input byte is mapped with the matrix T into the
// composite field GF((2^4)^2) as A = p*x + q, inverted there and mapped back
// with T^-1. For w(x) = x^2 + x + beta^14 the inverse is B = s*x + t with
//   delta = p*q ^ q^2 ^ p^2*beta^14,  s = p*delta^-1,  t = (p^q)*delta^-1,
// which takes three general GF(16) multipliers, two squarers, one constant
// multiplier and a GF(16) inverse, the latter a 16-entry truth table.
// Matrices, polynomials and formulas follow the composite-field method the
// design is built on; the gate-level form of each GF(16) operator is left to
// synthesis.
module gf_inverter
  import aes_pkg::*;
(
  input  byte_t d_i,   // GF(2^8) element
  output byte_t inv_o  // its inverse
);
  byte_t      a, b;
  logic [3:0] p, q, delta, delta_inv, s, t;

  always_comb begin
    a         = map_to_composite(d_i);
    p         = a[7:4];
    q         = a[3:0];
    delta     = gf16_mul(p, q) ^ gf16_sq(q) ^ gf16_mul(gf16_sq(p), BETA14);
    delta_inv = gf16_inv(delta);
    s         = gf16_mul(p, delta_inv);
    t         = gf16_mul(p ^ q, delta_inv);
    b         = {s, t};
    inv_o     = map_from_composite(b);
  end
endmodule
