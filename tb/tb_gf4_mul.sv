// tb_gf4_mul: exhaustive check of the GF(2^4) multiplier (all 256 operand
// pairs) against the schoolbook tower model, plus the identity a*1 = a.
module tb_gf4_mul;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b, p;

  gf4_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 4'(i >> 4);
      b = 4'(i);
      #1;
      checks++;
      if (p !== t4_mul(a, b)) begin
        failures++;
        $display("FAIL %h*%h=%h exp %h", a, b, p, t4_mul(a, b));
      end
      if (b == 4'h1) begin
        checks++;
        if (p !== a) begin failures++; $display("FAIL identity %h", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
