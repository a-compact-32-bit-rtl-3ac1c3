// tb_sbox_unit: exhaustive check of one S-box / inverse S-box unit in both
// directions against the reference S-box table, plus FIPS-197 samples.
module tb_sbox_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  byte_t d, q;
  mode_e mode;
  u8 fwd [256];
  u8 inv [256];

  sbox_unit dut (.d_i(d), .mode_i(mode), .d_o(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input byte_t got, input byte_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) fwd[a] = sbox(u8'(a));
    for (int a = 0; a < 256; a++) inv[fwd[a]] = u8'(a);
    mode = MODE_ENC;
    for (int a = 0; a < 256; a++) begin
      d = u8'(a); #1;
      expect_eq(q, fwd[a], $sformatf("S(%h)", d));
    end
    mode = MODE_DEC;
    for (int a = 0; a < 256; a++) begin
      d = u8'(a); #1;
      expect_eq(q, inv[a], $sformatf("S^-1(%h)", d));
    end
    // FIPS-197 table values
    mode = MODE_ENC; d = 8'h53; #1; expect_eq(q, 8'hed, "S(53)");
    mode = MODE_ENC; d = 8'h00; #1; expect_eq(q, 8'h63, "S(00)");
    mode = MODE_DEC; d = 8'h63; #1; expect_eq(q, 8'h00, "S^-1(63)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
