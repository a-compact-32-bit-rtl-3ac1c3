// tb_aes_ctrl: drives the controller with a model of the input buffer and
// checks the key preparation (10 compute/advance steps, capture, 22
// clocks), the block sequence (4 FRD clocks, 10 rounds of 4, LRD in the
// last round, columns 0..3 in order, key schedule steps), back-to-back
// blocks every 44 clocks, and that a block waits while a new key is
// prepared.
module tb_aes_ctrl;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       key_done, dec_key_we, key_ready;
  logic       buf_full, buf_release;
  mode_e      buf_mode, ks_mode, mode;
  logic       ks_load, ks_load_dec, ks_compute, ks_advance;
  logic       frd, lrd, state_we, out_we;
  logic [1:0] col;

  aes_ctrl dut (.clk, .rst_n, .key_done_i(key_done), .dec_key_we_o(dec_key_we),
                .key_ready_o(key_ready), .buf_full_i(buf_full), .buf_mode_i(buf_mode),
                .buf_release_o(buf_release), .ks_load_o(ks_load), .ks_load_dec_o(ks_load_dec),
                .ks_compute_o(ks_compute), .ks_advance_o(ks_advance), .ks_mode_o(ks_mode),
                .mode_o(mode), .frd_o(frd), .lrd_o(lrd), .col_o(col),
                .state_we_o(state_we), .out_we_o(out_we));

  always #5 clk = ~clk;

  // event counters, cleared by the test
  int n_load, n_load_dec, n_comp, n_adv, n_cap, n_frd, n_lrd, n_we, n_rel, n_out;
  logic [1:0] exp_col;
  int cycle = 0;
  int since_frd = 0;
  int frd_start [$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      n_load     += int'(ks_load);
      n_load_dec += int'(ks_load_dec);
      n_comp     += int'(ks_compute);
      n_adv      += int'(ks_advance);
      n_cap      += int'(dec_key_we);
      n_frd      += int'(frd);
      n_lrd      += int'(lrd);
      n_we       += int'(state_we);
      n_rel      += int'(buf_release);
      n_out      += int'(out_we);
      if (frd && col == 0) begin
        frd_start.push_back(cycle);
        since_frd = 0;
      end else since_frd++;
      // the last round occupies clocks 40..43 of a block
      if (lrd || out_we) begin
        checks++;
        if (since_frd < 40 || since_frd > 43 || !(lrd && out_we)) begin
          failures++;
          $display("FAIL LRD/output in block clock %0d", since_frd);
        end
      end
      if (state_we) begin
        if (col != exp_col) begin
          failures++;
          $display("FAIL column order: got %0d expected %0d", col, exp_col);
        end
        exp_col <= col + 2'd1;
      end
      if (buf_release) buf_full <= 1'b0;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic clear();
    {n_load, n_load_dec, n_comp, n_adv, n_cap, n_frd, n_lrd, n_we, n_rel, n_out} = '0;
  endtask

  task automatic prepare_key();
    int t0, t1;
    clear();
    key_done = 1;
    @(negedge clk);
    key_done = 0;
    t0 = cycle;
    expect_eq(int'(key_ready), 0, "key_ready low after a new key");
    while (!key_ready) @(negedge clk);
    t1 = cycle;
    expect_eq(t1 - t0, 22, "key preparation clocks");
    expect_eq(n_load, 1, "prep: one key load");
    expect_eq(n_load_dec, 0, "prep: loads the cipher key");
    expect_eq(n_comp, 10, "prep: compute steps");
    expect_eq(n_adv, 10, "prep: advance steps");
    expect_eq(n_cap, 1, "prep: deciphering key captured");
    expect_eq(n_frd + n_we, 0, "prep: core idle");
  endtask

  initial begin
    key_done = 0; buf_full = 0; buf_mode = MODE_ENC; exp_col = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prepare_key();

    // single deciphering block
    clear();
    buf_mode = MODE_DEC; buf_full = 1;
    @(negedge clk);
    expect_eq(int'(mode), int'(MODE_DEC), "block mode latched");
    repeat (50) @(negedge clk);
    expect_eq(n_load, 1, "block: one key load");
    expect_eq(n_load_dec, 1, "block: deciphering key chosen");
    expect_eq(n_frd, 4, "block: FRD clocks");
    expect_eq(n_we, 44, "block: state writes (11 x 4 columns)");
    expect_eq(n_lrd, 4, "block: LRD clocks");
    expect_eq(n_out, 4, "block: output words");
    expect_eq(n_rel, 1, "block: buffer released once");
    expect_eq(n_comp, 11, "block: key compute steps");
    expect_eq(n_adv, 10, "block: key advance steps");

    // three blocks streamed: the buffer refills right after each release
    clear();
    frd_start.delete();
    buf_mode = MODE_ENC; buf_full = 1;
    fork
      begin
        for (int b = 0; b < 2; b++) begin
          @(posedge clk iff buf_release);
          @(negedge clk);
          repeat (5) @(negedge clk);
          buf_full = 1;
        end
      end
    join
    repeat (140) @(negedge clk);
    expect_eq(frd_start.size(), 3, "streamed blocks started");
    if (frd_start.size() == 3) begin
      expect_eq(frd_start[1] - frd_start[0], 44, "block period 44 clocks");
      expect_eq(frd_start[2] - frd_start[1], 44, "block period 44 clocks");
    end
    expect_eq(n_we, 3 * 44, "streamed state writes");
    expect_eq(n_load_dec, 0, "enciphering key chosen");

    // a new key arrives while a block runs: the next block waits for it
    clear();
    frd_start.delete();
    buf_full = 1;
    repeat (10) @(negedge clk);
    key_done = 1;
    @(negedge clk);
    key_done = 0;
    repeat (5) @(negedge clk);
    buf_full = 1;   // second block waits in the buffer
    repeat (40) @(negedge clk);
    expect_eq(frd_start.size(), 1, "second block held during key preparation");
    repeat (40) @(negedge clk);
    expect_eq(n_cap, 1, "key prepared after the running block");
    expect_eq(frd_start.size(), 2, "second block ran after preparation");
    repeat (50) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
