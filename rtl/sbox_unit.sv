// sbox_unit: one byte of BytesSub (S-box) or inverse BytesSub (S^-1-box).
//
// Combinational. One composite-field inverter is shared by both directions.
// Forward: S(a) = affine(a^-1), the affine step being {1F}*x mod (x^8+1)
// xor {63}. Inverse: S^-1(b) = (inverse affine of b)^-1. An Enc/Dec
// multiplexer picks the result. Because the inverse affine step must come
// before the inversion, this unit also multiplexes the inverter's input (raw
// byte when enciphering, inverse-affine of it when deciphering); the output
// multiplexer chooses between affine(inverse) and the bare inverse.
module sbox_unit
  import aes_pkg::*;
(
  input  byte_t d_i,
  input  mode_e mode_i,  // MODE_ENC: S-box, MODE_DEC: inverse S-box
  output byte_t d_o
);
  byte_t inv_in, inv_out;

  assign inv_in = (mode_i == MODE_DEC) ? affine_inv(d_i) : d_i;

  gf_inverter u_inv (.d_i(inv_in), .inv_o(inv_out));

  assign d_o = (mode_i == MODE_DEC) ? inv_out : affine_fwd(inv_out);
endmodule
