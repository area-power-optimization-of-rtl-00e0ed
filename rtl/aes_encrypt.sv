// aes_encrypt: unrolled, pipelined AES-128 cipher.
//
// Stage 0 XORs the incoming plaintext with round key 0 (the initial
// AddRoundKey); stages 1..NR each apply one encryption round (aes_enc_round,
// the last one without MixColumn). Every stage ends in a register, so a
// block that enters with valid_in comes out NR+1 = 11 cycles later with
// valid_out, and a new block may enter on every cycle. A stage's data
// register only loads when a block is present, so idle stages do not
// toggle. There is no back-pressure.
//
// The round sequence is the paper's; unrolling and one register per round
// are this design's choice (the paper gives neither).
//
// Interface: clk, rst_n (asynchronous, active low, clears the valid bits),
// round_keys (held stable while blocks are in flight), valid_in/data_in,
// valid_out/data_out, busy (some block is in the pipeline).
module aes_encrypt
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

  assign round_out[0] = data_in ^ round_keys[0];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_enc_round #(.FINAL(r == NR)) u_round (
      .state_in  (stage_q[r-1]),
      .round_key (round_keys[r]),
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
