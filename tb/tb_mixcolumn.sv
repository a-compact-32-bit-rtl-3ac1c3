// tb_mixcolumn: MixColumn and Inverse MixColumn of known and random columns
// against the reference matrix product, and the inverse undoing the forward.
module tb_mixcolumn;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  word_t a, fq, iq, back;

  mixcolumn u_fwd  (.col_i(a),  .mode_i(MODE_ENC), .col_o(fq));
  mixcolumn u_inv  (.col_i(a),  .mode_i(MODE_DEC), .col_o(iq));
  mixcolumn u_back (.col_i(fq), .mode_i(MODE_DEC), .col_o(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a = 32'hdb135345; #1;
    expect_eq(fq, 32'h8e4da1bc, "MC(db135345)");
    a = 32'h8e4da1bc; #1;
    expect_eq(iq, 32'hdb135345, "IMC(8e4da1bc)");
    a = 32'hf20a225c; #1;
    expect_eq(fq, 32'h9fdc589d, "MC(f20a225c)");
    for (int n = 0; n < 300; n++) begin
      a = $urandom; #1;
      expect_eq(fq, mix_col(a, 0), $sformatf("MC(%h)", a));
      expect_eq(iq, mix_col(a, 1), $sformatf("IMC(%h)", a));
      expect_eq(back, a, $sformatf("IMC(MC(%h))", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
