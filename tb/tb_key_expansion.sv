// tb_key_expansion: checks all eleven round keys against the reference key
// schedule for the FIPS-197 Appendix A.1 key (including the published first
// and last round keys) and for 100 random keys.
module tb_key_expansion;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] key;
  logic [10:0][127:0] rk;
  logic [127:0] exp_rk [11];

  key_expansion dut (.key(key), .round_keys(rk));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s key=%h got=%h exp=%h", what, key, got, exp);
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
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check(rk[1], 128'ha0fafe1788542cb123a339392a6c7605, "A.1 round key 1");
    check(rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "A.1 round key 10");
    for (int n = 0; n <= 100; n++) begin
      if (n > 0) key = rand128();
      #1;
      expand_key(key, exp_rk);
      for (int r = 0; r < 11; r++) check(rk[r], exp_rk[r], $sformatf("round key %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
