// aes_enc_round: one AES encryption round, combinational.
//
// SubBytes through sixteen composite-field S-boxes and ShiftRows (both in
// sub_shift_rows), then MixColumn on each of the four columns, then
// AddRoundKey (XOR with the round key). With FINAL = 1 the MixColumn step is left out, as in the last
// round of the cipher. The order of the four steps follows the AES standard
// and the paper.
//
// Interface: state_in and round_key in, state_out out. No clock: the
// pipeline register is in aes_encrypt.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t shifted, mixed;

  sub_shift_rows #(.INVERSE(1'b0)) u_sub_shift (.state_in(state_in), .state_out(shifted));

  if (FINAL) begin : g_no_mix
    assign mixed = shifted;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      mix_column u_mix (
        .col_in  (shifted[127 - 32*c -: 32]),
        .col_out (mixed[127 - 32*c -: 32])
      );
    end
  end

  assign state_out = mixed ^ round_key;

endmodule
