// tb_aes_top: end-to-end test of the AES-128 engine at its default size.
//
// Phases (stimulus changes on the falling clock edge):
//   1. load key 2b7e1516...4f3c; encrypt 85fc3432abcd53210be0ac125ccdb110
//      (expected 9ba71628a7ee25e0416a7354a15b1321) while the decryptor is
//      given that ciphertext in the same cycle; then the four published
//      ECB-AES128 blocks for this key, back to back in both directions;
//   2. independent random traffic on both pipelines, both often busy at
//      once, including back-to-back runs;
//   3. loop-back: every ciphertext the encryptor returns is fed straight
//      into the decryptor, which must give back the original plaintext;
//   4. wait for both pipelines to drain, load the FIPS-197 C.1 key and run
//      the C.1 block both ways, then more random traffic.
// Every output is compared in order with the polynomial-basis reference
// model, and its latency must be 11 cycles. Each mechanism (key load,
// simultaneous encryption and decryption, back-to-back blocks, loop-back
// round trip, known-answer vectors) is counted; one that never happened
// counts as a failure.
module tb_aes_top;
  import aes_ref_pkg::*;
  localparam int unsigned LATENCY = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic key_load = 0;
  logic [127:0] key_in = '0, key = '0;
  logic enc_valid_in = 0, enc_valid_out, enc_busy;
  logic dec_valid_in = 0, dec_valid_out, dec_busy;
  logic [127:0] enc_data_in = '0, enc_data_out, dec_data_in = '0, dec_data_out;
  logic [127:0] enc_exp_in = '0, dec_exp_in = '0;
  logic [127:0] enc_q [$], dec_q [$];
  int unsigned enc_t [$], dec_t [$];
  logic [127:0] pt_q [$];
  int unsigned cycle = 0;
  bit loopback = 0;
  int n_key_loads = 0, n_simultaneous = 0, n_back_to_back = 0, n_round_trips = 0, n_known = 0;
  logic enc_valid_prev = 0;

  localparam logic [127:0] ECB_PT [4] = '{
    128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
    128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  localparam logic [127:0] ECB_CT [4] = '{
    128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'hf5d3d58503b9699de785895a96fdbaaf,
    128'h43b1cd7f598ece23881b00e3ed030688, 128'h7b0c785e27e8ad3f8223207104725dd4};

  aes_top dut (
    .clk, .rst_n, .key_load, .key_in,
    .enc_valid_in, .enc_data_in, .enc_valid_out, .enc_data_out, .enc_busy,
    .dec_valid_in, .dec_data_in, .dec_valid_out, .dec_data_out, .dec_busy
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted blocks, mechanism counters
  always @(posedge clk) begin
    if (rst_n) begin
      if (enc_valid_in) begin enc_q.push_back(enc_exp_in); enc_t.push_back(cycle); end
      if (dec_valid_in) begin dec_q.push_back(dec_exp_in); dec_t.push_back(cycle); end
      if (enc_valid_in && dec_valid_in) n_simultaneous++;
      if (enc_valid_in && enc_valid_prev) n_back_to_back++;
      enc_valid_prev <= enc_valid_in;
      if (key_load) n_key_loads++;
    end
  end

  // scoreboards
  always @(posedge clk) begin
    if (rst_n && enc_valid_out) begin
      if (enc_q.size() == 0) check(0, "unexpected ciphertext");
      else begin
        logic [127:0] e;
        int unsigned t0;
        e = enc_q.pop_front();
        t0 = enc_t.pop_front();
        check(enc_data_out === e, $sformatf("ciphertext %h exp %h", enc_data_out, e));
        check(cycle - t0 == LATENCY, $sformatf("encrypt latency %0d", cycle - t0));
      end
    end
    if (rst_n && dec_valid_out) begin
      if (dec_q.size() == 0) check(0, "unexpected plaintext");
      else begin
        logic [127:0] e;
        int unsigned t0;
        e = dec_q.pop_front();
        t0 = dec_t.pop_front();
        check(dec_data_out === e, $sformatf("plaintext %h exp %h", dec_data_out, e));
        check(cycle - t0 == LATENCY, $sformatf("decrypt latency %0d", cycle - t0));
        if (pt_q.size() != 0) begin
          logic [127:0] p;
          p = pt_q.pop_front();
          check(dec_data_out === p, "loop-back round trip");
          if (dec_data_out === p) n_round_trips++;
        end
      end
    end
  end

  // loop-back path: the decryptor takes whatever the encryptor returns
  always @(negedge clk) begin
    if (loopback) begin
      dec_valid_in = enc_valid_out;
      dec_data_in  = enc_data_out;
      dec_exp_in   = decrypt(enc_data_out, key);
    end
  end

  task automatic load_key(logic [127:0] k);
    while (enc_busy || dec_busy) @(negedge clk);
    key_load = 1'b1;
    key_in   = k;
    key      = k;
    @(negedge clk);
    key_load = 1'b0;
  endtask

  task automatic idle(int n);
    enc_valid_in = 1'b0;
    if (!loopback) dec_valid_in = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  task automatic random_traffic(int cycles, int enc_pct, int dec_pct);
    for (int i = 0; i < cycles; i++) begin
      enc_valid_in = ($urandom_range(99) < enc_pct);
      if (enc_valid_in) begin
        enc_data_in = rand128();
        enc_exp_in  = encrypt(enc_data_in, key);
        if (loopback) pt_q.push_back(enc_data_in);
      end
      if (!loopback) begin
        dec_valid_in = ($urandom_range(99) < dec_pct);
        if (dec_valid_in) begin
          dec_data_in = rand128();
          dec_exp_in  = decrypt(dec_data_in, key);
        end
      end
      @(negedge clk);
    end
    idle(1);
  endtask

  initial begin
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. the example block, both directions in the same cycle
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(encrypt(128'h85fc3432abcd53210be0ac125ccdb110, key) == 128'h9ba71628a7ee25e0416a7354a15b1321,
          "reference model on the example block");
    enc_valid_in = 1'b1; enc_data_in = 128'h85fc3432abcd53210be0ac125ccdb110;
    enc_exp_in   = 128'h9ba71628a7ee25e0416a7354a15b1321;
    dec_valid_in = 1'b1; dec_data_in = 128'h9ba71628a7ee25e0416a7354a15b1321;
    dec_exp_in   = 128'h85fc3432abcd53210be0ac125ccdb110;
    @(negedge clk);
    idle(LATENCY + 2);
    check(enc_q.size() == 0 && dec_q.size() == 0, "example block returned");
    n_known++;

    // published ECB-AES128 blocks for the same key, back to back both ways
    for (int i = 0; i < 4; i++) begin
      enc_valid_in = 1'b1; enc_data_in = ECB_PT[i]; enc_exp_in = ECB_CT[i];
      dec_valid_in = 1'b1; dec_data_in = ECB_CT[i]; dec_exp_in = ECB_PT[i];
      @(negedge clk);
    end
    idle(LATENCY + 2);
    check(enc_q.size() == 0 && dec_q.size() == 0, "ECB blocks returned");
    n_known++;

    // 2. independent traffic on both pipelines
    random_traffic(300, 75, 60);
    random_traffic(40, 100, 100);
    idle(LATENCY + 2);

    // 3. loop-back round trip
    loopback = 1'b1;
    random_traffic(200, 70, 0);
    idle(LATENCY + 2);
    loopback = 1'b0;
    dec_valid_in = 1'b0;
    idle(LATENCY + 2);

    // 4. new key, FIPS-197 C.1 vector, more traffic
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    enc_valid_in = 1'b1; enc_data_in = 128'h00112233445566778899aabbccddeeff;
    enc_exp_in   = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    dec_valid_in = 1'b1; dec_data_in = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    dec_exp_in   = 128'h00112233445566778899aabbccddeeff;
    @(negedge clk);
    idle(LATENCY + 2);
    check(enc_q.size() == 0 && dec_q.size() == 0, "C.1 block returned");
    n_known++;
    random_traffic(200, 60, 60);
    idle(LATENCY + 4);

    check(enc_q.size() == 0 && dec_q.size() == 0, "all blocks returned");
    check(pt_q.size() == 0, "all loop-back blocks returned");
    check(!enc_busy && !dec_busy, "pipelines empty at the end");
    $display("mechanisms: key_loads=%0d simultaneous=%0d back_to_back=%0d round_trips=%0d known_answers=%0d",
             n_key_loads, n_simultaneous, n_back_to_back, n_round_trips, n_known);
    check(n_key_loads >= 2, "key reload happened");
    check(n_simultaneous > 0, "simultaneous encrypt and decrypt happened");
    check(n_back_to_back > 0, "back-to-back blocks happened");
    check(n_round_trips > 0, "loop-back round trip happened");
    check(n_known == 3, "known-answer blocks ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
