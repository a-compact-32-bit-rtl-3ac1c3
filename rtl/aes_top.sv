// aes_top: compact AES-128 cipher/decipher chip with a 32-bit data path.
//
// One 128-bit block is enciphered or deciphered with a 128-bit key in 44
// clocks: 4 clocks of initial AddRoundKey while the block is read from the
// input buffer, then 10 rounds of 4 clocks, one state column per clock.
// Round keys are expanded on the fly, forward when enciphering and in
// reverse when deciphering; the S-box units (composite-field inverters) are
// shared by both directions.
//
// Pins (the chip entity; rst_n is this design's addition):
//   clk          AES system clock
//   rst_n        synchronous active-low reset
//   key_load     Key Load: key_data holds a key word this clock (4 words,
//                first word = key bytes 0..3)
//   key_data     Key Data [31:0]
//   aes_start    AES Start: first word of a block on data_in this clock;
//                words 1..3 follow on the next three clocks
//   enc_dec      Enc/Dec, sampled with aes_start: 0 encipher, 1 decipher
//   data_in      Data In [31:0]
//   load_ready   Load Ready: the input buffer can take a block
//   data_out     Data Out [31:0]
//   data_ready   Data Ready: data_out holds result word 0..3 in four
//                consecutive clocks
//   key_ready    the key is prepared (this design's addition; a block
//                loaded earlier waits in the buffer)
//
// Timing: after the fourth key word, key preparation takes 22 clocks. A
// block whose last word enters at clock t (key ready, core idle) has its
// first result word on data_out at clock t + 47. Back-to-back blocks come
// out every 44 clocks.
module aes_top
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  key_load,
  input  word_t key_data,
  input  logic  aes_start,
  input  logic  enc_dec,
  input  word_t data_in,
  output logic  load_ready,
  output word_t data_out,
  output logic  data_ready,
  output logic  key_ready
);
  block_t     enc_key, dec_key, rk_full, ks_key;
  logic       key_done, dec_key_we;
  logic       buf_full, buf_release;
  mode_e      buf_mode, core_mode, ks_mode;
  logic [1:0] col;
  word_t      buf_word, rk_word, core_out;
  logic       ks_load, ks_load_dec, ks_compute, ks_advance;
  logic       frd, lrd, state_we, out_we;

  key_reader u_key_reader (
    .clk, .rst_n,
    .key_load_i(key_load), .key_data_i(key_data),
    .dec_key_we_i(dec_key_we), .dec_key_i(rk_full),
    .enc_key_o(enc_key), .dec_key_o(dec_key), .key_done_o(key_done)
  );

  assign ks_key = ks_load_dec ? dec_key : enc_key;

  key_schedule u_key_schedule (
    .clk, .rst_n,
    .mode_i(ks_mode), .load_i(ks_load), .key_i(ks_key),
    .compute_i(ks_compute), .advance_i(ks_advance), .col_i(col),
    .rk_word_o(rk_word), .rk_o(rk_full)
  );

  data_input_buffer u_in_buf (
    .clk, .rst_n,
    .aes_start_i(aes_start), .mode_i(mode_e'(enc_dec)), .data_in_i(data_in),
    .load_ready_o(load_ready), .full_o(buf_full), .mode_o(buf_mode),
    .rd_idx_i(col), .rd_word_o(buf_word), .release_i(buf_release)
  );

  aes_ctrl u_ctrl (
    .clk, .rst_n,
    .key_done_i(key_done), .dec_key_we_o(dec_key_we), .key_ready_o(key_ready),
    .buf_full_i(buf_full), .buf_mode_i(buf_mode), .buf_release_o(buf_release),
    .ks_load_o(ks_load), .ks_load_dec_o(ks_load_dec), .ks_compute_o(ks_compute),
    .ks_advance_o(ks_advance), .ks_mode_o(ks_mode),
    .mode_o(core_mode), .frd_o(frd), .lrd_o(lrd), .col_o(col),
    .state_we_o(state_we), .out_we_o(out_we)
  );

  aes_core u_core (
    .clk, .rst_n,
    .mode_i(core_mode), .frd_i(frd), .lrd_i(lrd), .col_i(col), .we_i(state_we),
    .in_word_i(buf_word), .rk_word_i(rk_word), .out_word_o(core_out)
  );

  data_output_buffer u_out_buf (
    .clk, .rst_n,
    .we_i(out_we), .wr_idx_i(col), .wr_word_i(core_out),
    .data_out_o(data_out), .data_ready_o(data_ready)
  );
endmodule
