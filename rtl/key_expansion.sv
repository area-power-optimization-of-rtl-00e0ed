// key_expansion: AES-128 key schedule, fully combinational.
//
// Round key 0 is the cipher key. Each following round key r is built from
// the previous one (words w0..w3):
//   t  = SubWord(RotWord(w3)) ^ {rcon(r), 00, 00, 00}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// SubWord uses four composite-field S-boxes per round, the same S-box as the
// data path. The paper does not describe the key schedule; this is the
// FIPS-197 one, unrolled so that all NR+1 round keys are available at once
// for the unrolled encryptor and decryptor.
//
// Interface: key in (byte 0 in bits 127:120); round_keys[r] out for
// r = 0..NR. Combinational: the caller registers the key.
module key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  block_t          key,
  output block_t [NR:0]   round_keys
);

  assign round_keys[0] = key;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    logic [31:0] w [4];
    logic [31:0] rot, sub, t;

    for (genvar j = 0; j < 4; j++) begin : g_word
      assign w[j] = round_keys[r-1][127 - 32*j -: 32];
    end

    assign rot = {w[3][23:0], w[3][31:24]};

    for (genvar b = 0; b < 4; b++) begin : g_sbox
      composite_sbox #(.INVERSE(1'b0)) u_sbox (
        .din  (rot[31 - 8*b -: 8]),
        .dout (sub[31 - 8*b -: 8])
      );
    end

    assign t = sub ^ {rcon(r), 24'h0};

    assign round_keys[r][127:96] = w[0] ^ t;
    assign round_keys[r][95:64]  = w[1] ^ round_keys[r][127:96];
    assign round_keys[r][63:32]  = w[2] ^ round_keys[r][95:64];
    assign round_keys[r][31:0]   = w[3] ^ round_keys[r][63:32];
  end

endmodule
