// tb_aes_core: runs the round datapath alone, with the controller's
// sequence (FRD, rounds, LRD) and the round keys supplied from the reference
// expansion, and checks enciphered and deciphered blocks (FIPS-197 vectors
// and random ones) word by word in the last round.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  mode_e      mode;
  logic       frd, lrd, we;
  logic [1:0] col;
  word_t      in_word, rk_word, out_word;
  block_t     state;
  u128        rk [11];

  aes_core dut (.clk, .rst_n, .mode_i(mode), .frd_i(frd), .lrd_i(lrd), .col_i(col), .we_i(we),
                .in_word_i(in_word), .rk_word_i(rk_word), .out_word_o(out_word));
  // state register contents, byte k = row k%4 of column k/4
  always_comb for (int k = 0; k < 16; k++) state[127 - 8*k -: 8] = dut.u_shiftrow.st[k];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input u128 key, input u128 din, input mode_e m, input u128 exp);
    u128 got;
    int  kr;
    expand_key(key, rk);
    mode = m;
    for (int r = 0; r <= 10; r++) begin
      kr = (m == MODE_DEC) ? 10 - r : r;
      for (int c = 0; c < 4; c++) begin
        frd = (r == 0); lrd = (r == 10); col = 2'(c); we = 1;
        in_word = din[127 - 32*c -: 32];
        rk_word = rk[kr][127 - 32*c -: 32];
        #1;
        if (r == 10) got[127 - 32*c -: 32] = out_word;
        @(negedge clk);
      end
      // after the first round the state holds input ^ key
      if (r == 0) begin
        checks++;
        if (state !== (din ^ rk[kr])) begin
          failures++;
          $display("FAIL state after FRD %h", state);
        end
      end
    end
    we = 0; frd = 0; lrd = 0;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL mode %0d key %h in %h: got %h expected %h", m, key, din, got, exp);
    end
  endtask

  initial begin
    u128 k, p;
    mode = MODE_ENC; frd = 0; lrd = 0; we = 0; col = 0; in_word = 0; rk_word = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        MODE_ENC, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        MODE_DEC, 128'h00112233445566778899aabbccddeeff);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        MODE_ENC, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < 10; n++) begin
      k = rand128(); p = rand128();
      run(k, p, MODE_ENC, encrypt(k, p));
      run(k, p, MODE_DEC, decrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
