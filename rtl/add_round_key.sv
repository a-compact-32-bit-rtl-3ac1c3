// add_round_key: AddRoundKey for one 32-bit column, the XOR of the column
// with the round-key word of the same index. Combinational; shared by
// enciphering and deciphering.
module add_round_key
  import aes_pkg::*;
(
  input  word_t col_i,
  input  word_t key_i,
  output word_t col_o
);
  assign col_o = col_i ^ key_i;
endmodule
