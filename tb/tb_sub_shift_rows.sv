// tb_sub_shift_rows: checks SubBytes+ShiftRows and InvShiftRows+InvSubBytes
// on a state whose bytes are their own indices (hand-worked expected
// values: each output byte is S() of the byte the rotation brings there),
// against the reference model on random states, and that the inverse
// variant undoes the forward one.
module tb_sub_shift_rows;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, f, i_out, back, exp_f, exp_i;

  sub_shift_rows #(.INVERSE(1'b0)) dut_f (.state_in(s), .state_out(f));
  sub_shift_rows #(.INVERSE(1'b1)) dut_i (.state_in(s), .state_out(i_out));
  sub_shift_rows #(.INVERSE(1'b1)) dut_b (.state_in(f), .state_out(back));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
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
    logic [127:0] fidx, iidx;
    ref_init();
    s = 128'h000102030405060708090a0b0c0d0e0f;
    // byte positions after the left / right rotation of the rows
    fidx = 128'h00050a0f04090e03080d02070c01060b;
    iidx = 128'h000d0a0704010e0b0805020f0c090603;
    for (int k = 0; k < 16; k++) begin
      exp_f[127 - 8*k -: 8] = sbox_tab[fidx[127 - 8*k -: 8]];
      exp_i[127 - 8*k -: 8] = isbox_tab[iidx[127 - 8*k -: 8]];
    end
    #1;
    check(f, exp_f, "forward index state");
    check(i_out, exp_i, "inverse index state");
    for (int n = 0; n < 300; n++) begin
      s = rand128();
      #1;
      check(f, shift_rows(sub_bytes(s, 0), 0), "forward");
      check(i_out, sub_bytes(shift_rows(s, 1), 1), "inverse");
      check(back, s, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
