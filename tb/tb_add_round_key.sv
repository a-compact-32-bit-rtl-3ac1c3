// tb_add_round_key: XOR of column and key word for random and corner values.
module tb_add_round_key;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  word_t c, k, q;

  add_round_key dut (.col_i(c), .key_i(k), .col_o(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      c = (n == 0) ? 32'h0 : $urandom;
      k = (n == 1) ? 32'hffffffff : $urandom;
      #1;
      checks++;
      // reference without the xor operator: a + b - 2*(a & b) per bit
      for (int i = 0; i < 32; i++)
        if (q[i] !== ((c[i] | k[i]) & ~(c[i] & k[i]))) begin
          failures++;
          $display("FAIL %h ^ %h gave %h", c, k, q);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
