// tb_sbox_word: random 32-bit columns through the four S-box units in both
// directions, compared byte by byte with the reference S-box.
module tb_sbox_word;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  word_t w, q, exp;
  mode_e mode;
  u8 fwd [256];
  u8 inv [256];

  sbox_word dut (.w_i(w), .mode_i(mode), .w_o(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) fwd[a] = sbox(u8'(a));
    for (int a = 0; a < 256; a++) inv[fwd[a]] = u8'(a);
    for (int n = 0; n < 400; n++) begin
      w    = $urandom;
      mode = mode_e'(n[0]);
      #1;
      for (int i = 0; i < 4; i++) exp[8*i +: 8] = mode == MODE_DEC ? inv[w[8*i +: 8]] : fwd[w[8*i +: 8]];
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL mode %0d in %h got %h expected %h", mode, w, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
