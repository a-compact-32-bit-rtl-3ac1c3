// tb_data_output_buffer: writes result words as the core does in its last
// round and checks that Data Out presents words 0..3 in four consecutive
// clocks with Data Ready high in exactly those clocks.
module tb_data_output_buffer;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       we, ready;
  logic [1:0] idx;
  word_t      wd, dout;
  u128        blk;

  data_output_buffer dut (.clk, .rst_n, .we_i(we), .wr_idx_i(idx), .wr_word_i(wd),
                          .data_out_o(dout), .data_ready_o(ready));

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
    we = 0; idx = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      blk = rand128();
      for (int i = 0; i < 4; i++) begin
        we = 1; idx = 2'(i); wd = blk[127 - 32*i -: 32];
        @(negedge clk);
        expect_eq(128'(ready), 0, "no data_ready while collecting");
      end
      we = 0;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        expect_eq(128'(ready), 1, "data_ready");
        expect_eq(128'(dout), 128'(blk[127 - 32*i -: 32]), $sformatf("data_out word %0d", i));
        @(negedge clk);
      end
      expect_eq(128'(ready), 0, "data_ready drops after four words");
      repeat (3 + n % 5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
