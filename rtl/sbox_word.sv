// sbox_word: BytesSub / inverse BytesSub of one 32-bit column.
//
// Combinational: four sbox_unit instances, one per byte, all steered by the
// same Enc/Dec select. The round datapath and the key schedule each use one.
// The key schedule ties mode_i to MODE_ENC, since key expansion always uses
// the forward S-box.
module sbox_word
  import aes_pkg::*;
(
  input  word_t w_i,
  input  mode_e mode_i,
  output word_t w_o
);
  for (genvar i = 0; i < 4; i++) begin : g_unit
    sbox_unit u_sbox (.d_i(w_i[8*i +: 8]), .mode_i(mode_i), .d_o(w_o[8*i +: 8]));
  end
endmodule
