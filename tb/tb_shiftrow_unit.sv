// tb_shiftrow_unit: writes random states column by column and checks that
// the register changes only when column 3 is written, that the register holds
// the written state, and that every read column matches the reference
// ShiftRow / Inverse ShiftRow of that state.
module tb_shiftrow_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       we;
  logic [1:0] wr_col, rd_col;
  word_t      wr_word, rd_word;
  mode_e      mode;
  block_t     state, st_new, st_old, shifted;

  shiftrow_unit dut (.clk, .rst_n, .we_i(we), .wr_col_i(wr_col), .wr_word_i(wr_word),
                     .rd_col_i(rd_col), .mode_i(mode), .rd_word_o(rd_word));
  // register contents, byte k = row k%4 of column k/4
  always_comb for (int k = 0; k < 16; k++) state[127 - 8*k -: 8] = dut.st[k];

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
    we = 0; wr_col = 0; rd_col = 0; wr_word = 0; mode = MODE_ENC;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(state, '0, "reset state");
    for (int n = 0; n < 40; n++) begin
      st_old = state;
      st_new = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();
      for (int c = 0; c < 4; c++) begin
        we = 1; wr_col = 2'(c); wr_word = st_new[127 - 32*c -: 32];
        @(negedge clk);
        if (c < 3) expect_eq(state, st_old, $sformatf("state held after column %0d", c));
      end
      we = 0;
      expect_eq(state, st_new, "state after column 3");
      for (int m = 0; m < 2; m++) begin
        mode = mode_e'(m);
        shifted = shift_rows(st_new, m[0]);
        for (int c = 0; c < 4; c++) begin
          rd_col = 2'(c);
          #1;
          expect_eq(128'(rd_word), 128'(shifted[127 - 32*c -: 32]),
                    $sformatf("mode %0d column %0d", m, c));
        end
      end
      // known pattern: ShiftRow column 0 of bytes 00..0f is 00 05 0a 0f
      if (n == 0) begin
        mode = MODE_ENC; rd_col = 0; #1;
        expect_eq(128'(rd_word), 128'h00050a0f, "ShiftRow column 0");
        mode = MODE_DEC; rd_col = 0; #1;
        expect_eq(128'(rd_word), 128'h000d0a07, "Inverse ShiftRow column 0");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
