// tb_key_schedule: runs the on-the-fly expansion forward from random keys
// (and the FIPS-197 key) and backward from the last round key, comparing
// every round key and every word output with the reference expansion.
module tb_key_schedule;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  mode_e      mode;
  logic       load, compute, advance;
  block_t     key, rk;
  logic [1:0] col;
  word_t      rk_word;
  u128        ref_rk [11];

  key_schedule dut (.clk, .rst_n, .mode_i(mode), .load_i(load), .key_i(key),
                    .compute_i(compute), .advance_i(advance), .col_i(col),
                    .rk_word_o(rk_word), .rk_o(rk));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic check_words(input u128 exp, input string what);
    for (int c = 0; c < 4; c++) begin
      col = 2'(c);
      #1;
      expect_eq(128'(rk_word), 128'(exp[127 - 32*c -: 32]), $sformatf("%s word %0d", what, c));
    end
  endtask

  task automatic run(input u128 k, input mode_e m);
    mode = m;
    expand_key(k, ref_rk);
    key  = (m == MODE_DEC) ? ref_rk[10] : k;
    load = 1;
    @(negedge clk);
    load = 0;
    for (int s = 0; s <= 10; s++) begin
      int r = (m == MODE_DEC) ? 10 - s : s;
      expect_eq(rk, ref_rk[r], $sformatf("mode %0d round key %0d", m, r));
      check_words(ref_rk[r], $sformatf("round key %0d", r));
      if (s == 10) break;
      compute = 1;
      @(negedge clk);
      compute = 0;
      // c holds until advance
      expect_eq(rk, ref_rk[r], "key held between compute and advance");
      advance = 1;
      @(negedge clk);
      advance = 0;
    end
  endtask

  initial begin
    load = 0; compute = 0; advance = 0; col = 0; key = 0; mode = MODE_ENC;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, MODE_ENC);
    expect_eq(ref_rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference last key");
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, MODE_DEC);
    for (int n = 0; n < 8; n++) begin
      run(rand128(), MODE_ENC);
      run(rand128(), MODE_DEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
