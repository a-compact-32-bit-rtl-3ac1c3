// key_reader: assembles the 128-bit cipher key from the 32-bit Key Data pin
// and holds the two keys a block can start from.
//
// Each clock with key_load_i high takes one word of key_data_i, first word
// first (key bytes 0..3 in the first word, byte 0 in bits [31:24]). The
// words need not be consecutive. When the fourth word is taken, enc_key_o
// holds the new key and key_done_o pulses for one clock. dec_key_o is the
// last round key, written by the controller (dec_key_we_i) once the key
// schedule has run the forward expansion; a deciphering block starts from
// it. A new key always restarts at word 0 after four words.
module key_reader
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load_i,
  input  word_t  key_data_i,
  input  logic   dec_key_we_i,
  input  block_t dec_key_i,
  output block_t enc_key_o,
  output block_t dec_key_o,
  output logic   key_done_o
);
  word_t      kw [4];
  logic [1:0] idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) kw[i] <= '0;
      idx        <= '0;
      key_done_o <= 1'b0;
      dec_key_o  <= '0;
    end else begin
      key_done_o <= key_load_i && idx == 2'd3;
      if (key_load_i) begin
        kw[idx] <= key_data_i;
        idx     <= idx + 2'd1;
      end
      if (dec_key_we_i) dec_key_o <= dec_key_i;
    end
  end

  assign enc_key_o = {kw[0], kw[1], kw[2], kw[3]};
endmodule
