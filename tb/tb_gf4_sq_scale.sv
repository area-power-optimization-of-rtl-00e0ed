// tb_gf4_sq_scale: exhaustive check of the combined square-and-scale circuit
// against lambda*q*q computed with the schoolbook GF(2^4) model
// (lambda = {1000}). All 16 inputs.
module tb_gf4_sq_scale;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] q, k;

  gf4_sq_scale dut (.q(q), .k(k));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      q = 4'(i);
      #1;
      checks++;
      if (k !== t4_mul(t4_mul(q, q), 4'b1000)) begin
        failures++;
        $display("FAIL q=%h k=%h exp=%h", q, k, t4_mul(t4_mul(q, q), 4'b1000));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
