// tb_key_reader: loads keys word by word, with and without gaps, and checks
// the assembled key, the one-clock key_done pulse and the deciphering-key
// register.
module tb_key_reader;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  int done_count = 0;
  logic   clk = 0, rst_n = 0;
  logic   key_load, dec_we, key_done;
  word_t  key_data;
  block_t dec_in, enc_key, dec_key, k;

  key_reader dut (.clk, .rst_n, .key_load_i(key_load), .key_data_i(key_data),
                  .dec_key_we_i(dec_we), .dec_key_i(dec_in),
                  .enc_key_o(enc_key), .dec_key_o(dec_key), .key_done_o(key_done));

  always #5 clk = ~clk;
  always @(posedge clk) if (key_done) done_count++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    key_load = 0; key_data = 0; dec_we = 0; dec_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      int done_before;
      done_before = done_count;
      k = rand128();
      for (int i = 0; i < 4; i++) begin
        key_load = 1; key_data = k[127 - 32*i -: 32];
        @(negedge clk);
        key_load = 0;
        if (i < 3) expect_eq(128'(key_done), 0, "no key_done before word 3");
        if (n[0]) repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      if (!n[0]) expect_eq(128'(key_done), 1, "key_done after word 3");
      expect_eq(enc_key, k, "assembled key");
      @(negedge clk);
      expect_eq(128'(done_count - done_before), 1, "one key_done pulse per key");
      dec_in = rand128(); dec_we = 1;
      @(negedge clk);
      dec_we = 0;
      expect_eq(dec_key, dec_in, "deciphering key stored");
      expect_eq(enc_key, k, "cipher key unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
