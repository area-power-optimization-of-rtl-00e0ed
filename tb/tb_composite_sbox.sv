// tb_composite_sbox: exhaustive check of the forward and inverse
// composite-field S-boxes against tables built from the polynomial-basis
// definition (inverse modulo m(z), then the affine transform), plus a few
// well-known entries (S(00)=63, S(53)=ed, S^-1(63)=00).
module tb_composite_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] din, dout_f, dout_i;

  composite_sbox #(.INVERSE(1'b0)) dut_f (.din(din), .dout(dout_f));
  composite_sbox #(.INVERSE(1'b1)) dut_i (.din(din), .dout(dout_i));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s din=%h got=%h exp=%h", what, din, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      check(dout_f, sbox_tab[i], "sbox");
      check(dout_i, isbox_tab[i], "inv_sbox");
      if (i == 8'h00) check(dout_f, 8'h63, "S(00)");
      if (i == 8'h53) check(dout_f, 8'hed, "S(53)");
      if (i == 8'h63) check(dout_i, 8'h00, "Si(63)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
