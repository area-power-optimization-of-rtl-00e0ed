// tb_gf8_inv_composite: exhaustive check of the composite-field inverse:
// a * a^-1 = 1 for all 255 nonzero a using the schoolbook GF((2^4)^2)
// product with z^2 = z + {1000}, and 0 maps to 0.
module tb_gf8_inv_composite;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, a_inv;

  gf8_inv_composite dut (.a(a), .a_inv(a_inv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (i == 0 ? (a_inv !== 8'h00) : (t8_mul(a, a_inv) !== 8'h01)) begin
        failures++;
        $display("FAIL a=%h inv=%h", a, a_inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
