// aes_top: AES-128 encryption and decryption engines with a shared key.
//
// The cipher key is held in a register loaded by key_load and expanded
// combinationally (key_expansion) into all eleven round keys. The encryptor
// (aes_encrypt) and the decryptor (aes_decrypt) are independent 11-stage
// pipelines fed from these round keys; both may run at once, each accepting
// one 128-bit block per cycle and returning its result 11 cycles later. All
// S-boxes, in the data paths and in the key schedule, are composite-field
// S-boxes; the decryptor uses the enhanced, term-sharing InvMixColumn.
//
// The key register, the shared key schedule and the valid/busy interface
// are this design's choices; the paper gives the transformations.
//
// Interface (all synchronous to clk, rst_n asynchronous active low):
//   key_load/key_in          load a new cipher key (byte 0 in bits 127:120);
//                            only while both pipelines are empty (asserted)
//   enc_valid_in/enc_data_in plaintext in;  enc_valid_out/enc_data_out
//                            ciphertext out 11 cycles later
//   dec_valid_in/dec_data_in ciphertext in; dec_valid_out/dec_data_out
//                            plaintext out 11 cycles later
//   enc_busy/dec_busy        a block is inside that pipeline
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  input  logic   enc_valid_in,
  input  block_t enc_data_in,
  output logic   enc_valid_out,
  output block_t enc_data_out,
  output logic   enc_busy,
  input  logic   dec_valid_in,
  input  block_t dec_data_in,
  output logic   dec_valid_out,
  output block_t dec_data_out,
  output logic   dec_busy
);

  block_t        key_q;
  block_t [NR:0] round_keys;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        key_q <= '0;
    else if (key_load) key_q <= key_in;
  end

  key_expansion #(.NR(NR)) u_key_exp (.key(key_q), .round_keys(round_keys));

  aes_encrypt #(.NR(NR)) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .round_keys (round_keys),
    .valid_in   (enc_valid_in),
    .data_in    (enc_data_in),
    .valid_out  (enc_valid_out),
    .data_out   (enc_data_out),
    .busy       (enc_busy)
  );

  aes_decrypt #(.NR(NR)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .round_keys (round_keys),
    .valid_in   (dec_valid_in),
    .data_in    (dec_data_in),
    .valid_out  (dec_valid_out),
    .data_out   (dec_data_out),
    .busy       (dec_busy)
  );

  // A new key must not reach blocks already in flight, nor blocks entering
  // in the same cycle.
  a_key_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    key_load |-> !(enc_busy || dec_busy || enc_valid_in || dec_valid_in))
    else $error("aes_top: key_load while blocks are in flight");

endmodule
