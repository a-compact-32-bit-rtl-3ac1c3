// mixcolumn: MixColumn or Inverse MixColumn of one 32-bit column.
//
// Combinational, one column per clock. Output byte r is the sum over the
// four input bytes of a fixed-coefficient product: row 0 of the forward
// matrix is {02,03,01,01} (a(x) = {03}x^3 + {01}x^2 + {01}x + {02}) and row 0 of
// the inverse matrix is {0E,0B,0D,09} (b(x) = a(x)^-1); the other rows are
// rotations. Four output units each take x1/x2/x3 and x09/x0B/x0D/x0E
// products, an Enc/Dec multiplexer per term picks the forward or inverse
// coefficient, and an XOR tree sums them. The constant multipliers are
// built from xtime ({02}) steps.
module mixcolumn
  import aes_pkg::*;
(
  input  word_t col_i,
  input  mode_e mode_i,  // MODE_ENC: MixColumn, MODE_DEC: Inverse MixColumn
  output word_t col_o
);
  byte_t a [4];
  byte_t m2 [4], m3 [4], m4 [4], m8 [4], m9 [4], mb [4], md [4], me [4];
  byte_t y [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i]  = get_byte(col_i, i);
      m2[i] = xtime(a[i]);
      m4[i] = xtime(m2[i]);
      m8[i] = xtime(m4[i]);
      m3[i] = m2[i] ^ a[i];
      m9[i] = m8[i] ^ a[i];
      mb[i] = m8[i] ^ m2[i] ^ a[i];
      md[i] = m8[i] ^ m4[i] ^ a[i];
      me[i] = m8[i] ^ m4[i] ^ m2[i];
    end
    for (int r = 0; r < 4; r++) begin
      if (mode_i == MODE_DEC)
        y[r] = me[r] ^ mb[(r+1)%4] ^ md[(r+2)%4] ^ m9[(r+3)%4];
      else
        y[r] = m2[r] ^ m3[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    col_o = {y[0], y[1], y[2], y[3]};
  end
endmodule
