// aes_core: the iterative 32-bit round datapath of AES-128.
//
// One state column is processed per clock, so a round takes four clocks and
// a block (one loading round plus ten rounds) 44 clocks. The state sits in
// the 16x8-bit register of shiftrow_unit; from there each column goes
//   enciphering:  ShiftRow -> BytesSub -> MixColumn -> AddRoundKey -> state
//   deciphering:  Inv ShiftRow -> Inv BytesSub -> AddRoundKey -> Inv MixColumn -> state
// Both directions share the four S-box units (one composite-field inverter
// each) and AddRoundKey. Multiplexers as in the block diagram:
//   frd_i  (first round)  AddRoundKey takes the input-buffer word instead
//                         of the round result, and Inv MixColumn is skipped;
//   lrd_i  (last round)   MixColumn is skipped when enciphering; the result
//                         word then leaves on out_word_o;
//   mode_i (Enc/Dec)      selects the direction of every unit.
// The loop order (state register ahead of the ShiftRow switch, Inverse
// MixColumn after AddRoundKey) keeps the cyclic order of the diagram;
// BytesSub and ShiftRow are swapped in the enciphering path, which is
// equivalent because one works on single bytes and the other only moves
// them. Two MixColumn instances (forward and inverse) avoid a false
// combinational loop through shared multiplexers.
//
// Timing: col_i and we_i come from the controller every clock; out_word_o is
// combinational and valid in the clock of the column it belongs to.
module aes_core
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode_i,
  input  logic       frd_i,       // first (key-only) round: load from buffer
  input  logic       lrd_i,       // last round: no (Inv) MixColumn
  input  logic [1:0] col_i,       // column processed this clock
  input  logic       we_i,        // write the result column into the state
  input  word_t      in_word_i,   // input-buffer word col_i
  input  word_t      rk_word_i,   // round-key word col_i
  output word_t      out_word_o   // AddRoundKey result of this clock
);
  word_t sr_word, sb_word, mc_word, imc_word, ark_in, ark_out, wr_word;

  shiftrow_unit u_shiftrow (
    .clk, .rst_n,
    .we_i(we_i), .wr_col_i(col_i), .wr_word_i(wr_word),
    .rd_col_i(col_i), .mode_i(mode_i), .rd_word_o(sr_word)
  );

  sbox_word u_sbox (.w_i(sr_word), .mode_i(mode_i), .w_o(sb_word));

  mixcolumn u_mix    (.col_i(sb_word), .mode_i(MODE_ENC), .col_o(mc_word));

  always_comb begin
    if (frd_i)                              ark_in = in_word_i;
    else if (mode_i == MODE_DEC || lrd_i)   ark_in = sb_word;
    else                                    ark_in = mc_word;
  end

  add_round_key u_ark (.col_i(ark_in), .key_i(rk_word_i), .col_o(ark_out));

  mixcolumn u_invmix (.col_i(ark_out), .mode_i(MODE_DEC), .col_o(imc_word));

  assign wr_word    = (mode_i == MODE_DEC && !frd_i && !lrd_i) ? imc_word : ark_out;
  assign out_word_o = ark_out;
endmodule
