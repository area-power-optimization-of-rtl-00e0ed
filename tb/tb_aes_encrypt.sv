// tb_aes_encrypt: drives the pipelined AES-128 cipher with round keys from the
// reference key schedule. First the FIPS-197 Appendix C.1 block alone, to
// measure the latency (must be 11 cycles), then a stream of random blocks
// with random gaps, including runs of back-to-back blocks that must all come
// out one per cycle. Every output is compared with the reference model, in
// order; stimulus changes on the falling clock edge. An output without a
// pending block, or a block lost, is a failure.
module tb_aes_encrypt;
  import aes_ref_pkg::*;
  localparam int unsigned LATENCY = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [10:0][127:0] round_keys;
  logic valid_in = 0, valid_out, busy;
  logic [127:0] data_in = '0, data_out;
  logic [127:0] key;
  logic [127:0] rk_arr [11];
  logic [127:0] expq [$];
  int unsigned inq [$];
  int unsigned cycle = 0;
  int max_run = 0, run = 0;

  aes_encrypt dut (.clk, .rst_n, .round_keys, .valid_in, .data_in, .valid_out, .data_out, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && valid_out) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", data_out);
      end else begin
        logic [127:0] e;
        int unsigned t0;
        e = expq.pop_front();
        t0 = inq.pop_front();
        if (data_out !== e) begin
          failures++;
          $display("FAIL got=%h exp=%h", data_out, e);
        end
        checks++;
        if (cycle - t0 != LATENCY) begin
          failures++;
          $display("FAIL latency %0d", cycle - t0);
        end
      end
    end
  end

  logic [127:0] exp_in;

  // record each accepted block and the edge that accepted it
  always @(posedge clk) begin
    if (rst_n && valid_in) begin
      expq.push_back(exp_in);
      inq.push_back(cycle);
    end
  end

  task automatic send(logic [127:0] blk, logic [127:0] exp);
    valid_in = 1'b1;
    data_in = blk;
    exp_in = exp;
    @(negedge clk);
    valid_in = 1'b0;
  endtask

  initial begin
    ref_init();
    key = 128'h000102030405060708090a0b0c0d0e0f;
    expand_key(key, rk_arr);
    for (int r = 0; r < 11; r++) round_keys[r] = rk_arr[r];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    send(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    repeat (15) @(negedge clk);
    checks++;
    if (expq.size() != 0 || busy) begin failures++; $display("FAIL known block not returned"); end
    for (int n = 0; n < 400; n++) begin
      logic [127:0] b;
      b = rand128();
      send(b, encrypt(b, key));
      if ($urandom_range(3) == 0) begin
        run = 0;
        repeat ($urandom_range(3)) @(negedge clk);
      end else begin
        run++;
        if (run > max_run) max_run = run;
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d blocks lost", expq.size()); end
    checks++;
    if (max_run < 5) begin failures++; $display("FAIL no back-to-back run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
