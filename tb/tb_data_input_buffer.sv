// tb_data_input_buffer: loads blocks through the start/word protocol and
// checks Load Ready, the full flag, the stored mode and words, that a start
// while busy is ignored, and that release empties the buffer.
module tb_data_input_buffer;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       start, load_ready, full, release_b;
  mode_e      mode_in, mode_out;
  word_t      din, rd_word;
  logic [1:0] rd_idx;
  u128        blk;

  data_input_buffer dut (.clk, .rst_n, .aes_start_i(start), .mode_i(mode_in), .data_in_i(din),
                         .load_ready_o(load_ready), .full_o(full), .mode_o(mode_out),
                         .rd_idx_i(rd_idx), .rd_word_o(rd_word), .release_i(release_b));

  always #5 clk = ~clk;

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
    start = 0; mode_in = MODE_ENC; din = 0; rd_idx = 0; release_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(128'({load_ready, full}), 128'b10, "empty after reset");
    for (int n = 0; n < 20; n++) begin
      blk = rand128();
      mode_in = mode_e'(n[0]);
      for (int i = 0; i < 4; i++) begin
        start = (i == 0); din = blk[127 - 32*i -: 32];
        @(negedge clk);
        start = 0;
        expect_eq(128'(load_ready), 0, "not ready while filling");
        expect_eq(128'(full), (i == 3), "full only after word 3");
      end
      mode_in = mode_e'(~n[0]);
      // a start while full is ignored
      start = 1; din = 32'hdeadbeef;
      repeat (3) @(negedge clk);
      start = 0;
      expect_eq(128'(full), 1, "still full");
      expect_eq(128'(mode_out), 128'(n[0]), "stored mode");
      for (int i = 0; i < 4; i++) begin
        rd_idx = 2'(i); #1;
        expect_eq(128'(rd_word), 128'(blk[127 - 32*i -: 32]), $sformatf("word %0d", i));
      end
      release_b = 1;
      @(negedge clk);
      release_b = 0;
      expect_eq(128'({load_ready, full}), 128'b10, "empty after release");
      repeat (n % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
