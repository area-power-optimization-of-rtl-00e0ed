// tb_inv_mix_column: checks InvMixColumn of one column against the polynomial-basis matrix
// product of the reference model: the published test columns (db 13 53 45
// <-> 8e 4d a1 bc and others), every single-byte column (each byte value in
// each position, so every coefficient is exercised on every input bit) and
// 2000 random columns.
module tb_inv_mix_column;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] col_in, col_out;

  inv_mix_column dut (.col_in(col_in), .col_out(col_out));

  localparam logic [31:0] KNOWN [6][2] = '{{32'h8e4da1bc, 32'hdb135345}, {32'h9fdc589d, 32'hf20a225c}, {32'h01010101, 32'h01010101}, {32'hc6c6c6c6, 32'hc6c6c6c6}, {32'hd5d5d7d6, 32'hd4d4d4d5}, {32'h4d7ebdf8, 32'h2d26314c}};

  task automatic check(logic [31:0] exp);
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL in=%h got=%h exp=%h", col_in, col_out, exp);
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
    for (int i = 0; i < 6; i++) begin
      col_in = KNOWN[i][0];
      #1 check(KNOWN[i][1]);
    end
    for (int pos = 0; pos < 4; pos++)
      for (int v = 0; v < 256; v++) begin
        col_in = 32'(v) << (8*pos);
        #1 check(mix_col(col_in, 1));
      end
    for (int n = 0; n < 2000; n++) begin
      col_in = $urandom;
      #1 check(mix_col(col_in, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
