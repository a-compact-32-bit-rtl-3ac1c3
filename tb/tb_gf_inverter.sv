// tb_gf_inverter: exhaustive check of the composite-field inverter against
// a^254 computed in the AES polynomial basis, and of a * a^-1 = 1.
module tb_gf_inverter;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] d, inv;

  gf_inverter dut (.d_i(d), .inv_o(inv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      d = u8'(a);
      #1;
      checks++;
      if (inv !== ginv(d)) begin
        failures++;
        $display("FAIL inv(%h) = %h, expected %h", d, inv, ginv(d));
      end
      if (a != 0) begin
        checks++;
        if (gmul(d, inv) != 8'h01) begin
          failures++;
          $display("FAIL %h * %h != 1", d, inv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
