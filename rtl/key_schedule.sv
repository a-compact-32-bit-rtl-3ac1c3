// key_schedule: on-the-fly AES-128 round-key expansion, forward and inverse.
//
// Two 128-bit registers: the Roundkeys register c0..c3 holds the round key
// in use (word col_i goes to AddRoundKey), the next-key register c'0..c'3
// receives the following round key. From c the next key is one chain of
// XORs:
//   forward:  c'0 = c0 ^ g(c3),       c'i = ci ^ c'(i-1)   (i = 1..3)
//   inverse:  c'0 = c0 ^ g(c3 ^ c2),  c'i = ci ^ c(i-1)
// with g(w) = SubWord(RotWord(w)) ^ {Rcon, 00, 00, 00}. An Enc/Dec
// multiplexer per word picks the chain input. RotWord is a fixed one-byte
// word rotation; SubWord uses four forward S-box units of its own. Rcon
// comes from an 8-bit feedback register: it starts at {01} (forward) or {36}
// (inverse) and is multiplied by x (forward) or x^-1 (inverse) on each step.
//
// Controls (one clock each, chosen by the controller):
//   load_i     c <= key_i, Rcon <= start value for mode_i
//   compute_i  c' <= next key of c, Rcon steps
//   advance_i  c <= c'
// load_i wins over advance_i. Inverse expansion needs the last round key as
// key_i; the controller obtains it by running the forward expansion once.
module key_schedule
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode_i,
  input  logic       load_i,
  input  block_t     key_i,
  input  logic       compute_i,
  input  logic       advance_i,
  input  logic [1:0] col_i,
  output word_t      rk_word_o,  // word col_i of the current round key
  output block_t     rk_o        // current round key
);
  word_t c  [4];
  word_t cn [4];
  word_t nxt [4];
  word_t rot_in, rot_word, sub_word;
  byte_t rcon;

  assign rot_in   = (mode_i == MODE_DEC) ? (c[3] ^ c[2]) : c[3];
  assign rot_word = {rot_in[23:0], rot_in[31:24]};

  sbox_word u_sbox (.w_i(rot_word), .mode_i(MODE_ENC), .w_o(sub_word));

  always_comb begin
    nxt[0] = c[0] ^ sub_word ^ {rcon, 24'h0};
    for (int i = 1; i < 4; i++)
      nxt[i] = c[i] ^ ((mode_i == MODE_DEC) ? c[i-1] : nxt[i-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        c[i]  <= '0;
        cn[i] <= '0;
      end
      rcon <= RCON_FIRST;
    end else begin
      if (load_i) begin
        for (int i = 0; i < 4; i++) c[i] <= key_i[127 - 32*i -: 32];
        rcon <= (mode_i == MODE_DEC) ? RCON_LAST : RCON_FIRST;
      end else if (advance_i) begin
        for (int i = 0; i < 4; i++) c[i] <= cn[i];
      end
      if (compute_i && !load_i) begin
        for (int i = 0; i < 4; i++) cn[i] <= nxt[i];
        rcon <= (mode_i == MODE_DEC) ? xtime_inv(rcon) : xtime(rcon);
      end
    end
  end

  assign rk_word_o = c[col_i];
  assign rk_o      = {c[0], c[1], c[2], c[3]};
endmodule
