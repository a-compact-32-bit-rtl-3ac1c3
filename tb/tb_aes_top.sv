// tb_aes_top: end-to-end test of the AES-128 chip through its pins.
//
// A host process loads keys and sends blocks with the start/word protocol
// whenever Load Ready is high; a monitor gathers the four Data Out words of
// each result and compares them with the reference cipher. The sequence
// covers the FIPS-197 vectors, random keys and blocks in both directions,
// back-to-back blocks (checked at one per 44 clocks, three blocks in 132),
// the enciphering/deciphering switch between consecutive blocks, a block
// waiting in the buffer while a key is prepared, and a new key arriving
// while a block is running. Each of these mechanisms is counted and a
// failure is recorded for one that never happened.
module tb_aes_top;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        key_load = 0, aes_start = 0, enc_dec = 0;
  logic [31:0] key_data = 0, data_in = 0, data_out;
  logic        load_ready, data_ready, key_ready;

  aes_top dut (.clk, .rst_n, .key_load, .key_data, .aes_start, .enc_dec, .data_in,
               .load_ready, .data_out, .data_ready, .key_ready);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  // expected results, in order
  u128 exp_q [$];
  int  start_cycle_q [$];
  int  results = 0;
  int  first_ready [$];

  // mechanism counters
  int n_enc = 0, n_dec = 0, n_frd = 0, n_lrd = 0, n_prep = 0, n_stream = 0;
  int n_switch = 0, n_wait_key = 0, n_key_mid_block = 0;

  // monitor: collect result words
  initial begin
    u128 got;
    forever begin
      @(posedge clk iff (data_ready && rst_n));
      first_ready.push_back(cycle);
      got[127:96] = data_out;
      for (int i = 1; i < 4; i++) begin
        @(posedge clk);
        checks++;
        if (!data_ready) begin
          failures++;
          $display("FAIL data_ready dropped inside a block");
        end
        got[127 - 32*i -: 32] = data_out;
      end
      results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", got);
      end else begin
        u128 exp;
        exp = exp_q.pop_front();
        if (got !== exp) begin
          failures++;
          $display("FAIL result %0d: got %h expected %h", results, got, exp);
        end
      end
    end
  end

  // internal events, observed for the mechanism counts only
  logic last_mode = 0;
  int   frd_cycle_q [$];
  int   lrd_end_q [$];
  logic prev_ctrl_round_end = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.frd_o && dut.u_ctrl.col_o == 0) begin
      n_frd++;
      frd_cycle_q.push_back(cycle);
      if (prev_ctrl_round_end) n_stream++;
      if (n_frd > 1 && dut.u_ctrl.mode_o != last_mode) n_switch++;
      last_mode = dut.u_ctrl.mode_o;
    end
    prev_ctrl_round_end = dut.u_ctrl.lrd_o && dut.u_ctrl.col_o == 3;
    if (prev_ctrl_round_end) lrd_end_q.push_back(cycle + 1);
    if (dut.u_ctrl.lrd_o && dut.u_ctrl.col_o == 0) n_lrd++;
    if (dut.u_ctrl.dec_key_we_o) n_prep++;
    if (dut.u_key_reader.key_done_o && dut.u_ctrl.state_we_o) n_key_mid_block++;
    if (dut.u_in_buf.full_o && !key_ready) n_wait_key++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input u128 k);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      key_load = 1; key_data = k[127 - 32*i -: 32];
    end
    @(negedge clk);
    key_load = 0;
  endtask

  // send a block as soon as the buffer accepts one
  task automatic send_block(input u128 k, input u128 blk, input bit dec);
    @(negedge clk);
    while (!load_ready) @(negedge clk);
    exp_q.push_back(dec ? decrypt(k, blk) : encrypt(k, blk));
    start_cycle_q.push_back(cycle);
    if (dec) n_dec++; else n_enc++;
    for (int i = 0; i < 4; i++) begin
      aes_start = (i == 0); enc_dec = dec; data_in = blk[127 - 32*i -: 32];
      @(negedge clk);
    end
    aes_start = 0;
  endtask

  task automatic drain();
    while (results < n_enc + n_dec) @(negedge clk);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    u128 k1, k2, p;
    int  t0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // FIPS-197 Appendix C.1 key; block sent before the key is ready waits
    k1 = 128'h000102030405060708090a0b0c0d0e0f;
    load_key(k1);
    send_block(k1, 128'h00112233445566778899aabbccddeeff, 0);
    drain();
    // single-block latency: start clock to first data_ready clock
    send_block(k1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    t0 = start_cycle_q[$];
    drain();
    expect_eq(first_ready[$] - t0, 50, "latency, start word to first result word");

    // FIPS-197 Appendix B
    k2 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(k2);
    send_block(k2, 128'h3243f6a8885a308d313198a2e0370734, 0);
    drain();

    // three blocks back to back: one result every 44 clocks
    begin
      int s, f;
      s = first_ready.size();
      f = frd_cycle_q.size();
      for (int b = 0; b < 3; b++) send_block(k2, rand128(), 0);
      drain();
      expect_eq(first_ready[s+1] - first_ready[s], 44, "block period");
      expect_eq(first_ready[s+2] - first_ready[s+1], 44, "block period");
      // first clock of block 1 to the clock after the last word of block 3
      expect_eq(lrd_end_q[f+2] - frd_cycle_q[f], 132, "three blocks in 132 clocks");
    end

    // random keys, mixed directions, streamed
    for (int n = 0; n < 12; n++) begin
      k1 = rand128();
      load_key(k1);
      for (int b = 0; b < 4; b++) send_block(k1, rand128(), ($urandom & 1) == 1);
      drain();
    end

    // a new key while a block runs: the next block uses the new key
    k1 = rand128();
    k2 = rand128();
    load_key(k1);
    send_block(k1, rand128(), 1);
    @(posedge clk iff dut.u_ctrl.frd_o);
    repeat (12) @(negedge clk);
    fork
      load_key(k2);
    join
    send_block(k2, rand128(), 1);
    send_block(k2, rand128(), 0);
    drain();

    repeat (10) @(negedge clk);
    expect_eq(exp_q.size(), 0, "all results received");
    $display("mechanisms: enc=%0d dec=%0d frd=%0d lrd=%0d key_prep=%0d stream=%0d switch=%0d wait_key=%0d key_mid_block=%0d",
             n_enc, n_dec, n_frd, n_lrd, n_prep, n_stream, n_switch, n_wait_key, n_key_mid_block);
    checks++; if (n_enc == 0)           begin failures++; $display("FAIL no enciphering block"); end
    checks++; if (n_dec == 0)           begin failures++; $display("FAIL no deciphering block"); end
    checks++; if (n_frd != n_enc + n_dec) begin failures++; $display("FAIL first-round count"); end
    checks++; if (n_lrd != n_enc + n_dec) begin failures++; $display("FAIL last-round count"); end
    checks++; if (n_prep == 0)          begin failures++; $display("FAIL no key preparation"); end
    checks++; if (n_stream == 0)        begin failures++; $display("FAIL no back-to-back block"); end
    checks++; if (n_switch == 0)        begin failures++; $display("FAIL no Enc/Dec switch"); end
    checks++; if (n_wait_key == 0)      begin failures++; $display("FAIL no block waited for a key"); end
    checks++; if (n_key_mid_block == 0) begin failures++; $display("FAIL no key load during a block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
