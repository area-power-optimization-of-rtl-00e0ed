// aes_decrypt: unrolled, pipelined AES-128 inverse cipher.
//
// Stage 0 XORs the incoming ciphertext with the last round key (round key
// NR); stage r = 1..NR applies one decryption round (aes_dec_round) with
// round key NR-r: InvShiftRows, composite-field InvSubBytes, AddRoundKey and
// the enhanced InvMixColumn, the last stage without InvMixColumn. Every
// stage ends in a register: latency NR+1 = 11 cycles, one block per cycle,
// no back-pressure. A stage's data register only loads when a block is
// present.
//
// The round sequence and the enhanced InvMixColumn are the paper's;
// unrolling and one register per round are this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low, clears the valid bits),
// round_keys (the encryption round keys, held stable while blocks are in
// flight), valid_in/data_in, valid_out/data_out, busy.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  logic          clk,
  input  logic          rst_n,
  input  block_t [NR:0] round_keys,
  input  logic          valid_in,
  input  block_t        data_in,
  output logic          valid_out,
  output block_t        data_out,
  output logic          busy
);

  block_t        stage_q [NR+1];
  logic   [NR:0] valid_q;
  block_t        round_out [NR+1];

  assign round_out[0] = data_in ^ round_keys[NR];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_dec_round #(.FINAL(r == NR)) u_round (
      .state_in  (stage_q[r-1]),
      .round_key (round_keys[NR-r]),
      .state_out (round_out[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[NR-1:0], valid_in};
  end

  always_ff @(posedge clk) begin
    if (valid_in) stage_q[0] <= round_out[0];
    for (int r = 1; r <= NR; r++)
      if (valid_q[r-1]) stage_q[r] <= round_out[r];
  end

  assign valid_out = valid_q[NR];
  assign data_out  = stage_q[NR];
  assign busy      = |valid_q;

endmodule
