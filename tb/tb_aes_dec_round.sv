// tb_aes_dec_round: checks one decryption round (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumn) and its final-round variant against the
// reference model on random states and keys, and the normal round on a
// worked example from the FIPS-197 AES-128 test (Appendix B / C.1).
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s, rk, out_n, out_f;

  aes_dec_round #(.FINAL(1'b0)) dut_n (.state_in(s), .round_key(rk), .state_out(out_n));
  aes_dec_round #(.FINAL(1'b1)) dut_f (.state_in(s), .round_key(rk), .state_out(out_f));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%h got=%h exp=%h", what, s, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    s = 128'h7ad5fda789ef4e272bca100b3d9ff59f; rk = 128'h549932d1f08557681093ed9cbe2c974e;
    #1 check(out_n, 128'h54d990a16ba09ab596bbf40ea111702f, "known round");
    for (int n = 0; n < 300; n++) begin
      s = rand128(); rk = rand128();
      #1;
      check(out_n, dec_round(s, rk, 0), "round");
      check(out_f, dec_round(s, rk, 1), "final round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
