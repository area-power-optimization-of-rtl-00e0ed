// tb_gf4_inv: exhaustive check of the GF(2^4) inverse: a * a^-1 = 1 for
// every nonzero a (schoolbook product), and 0 maps to 0.
module tb_gf4_inv;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, a_inv;

  gf4_inv dut (.a(a), .a_inv(a_inv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      checks++;
      if (i == 0 ? (a_inv !== 4'h0) : (t4_mul(a, a_inv) !== 4'h1)) begin
        failures++;
        $display("FAIL a=%h inv=%h", a, a_inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
