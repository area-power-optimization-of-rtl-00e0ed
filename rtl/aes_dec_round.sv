// aes_dec_round: one AES decryption round, combinational.
//
// InvShiftRows, then InvSubBytes through sixteen inverse composite-field
// S-boxes (both in sub_shift_rows), then AddRoundKey, then the enhanced
// InvMixColumn on each column. With FINAL = 1 the InvMixColumn step is left out (last round of the
// inverse cipher). InvShiftRows before InvSubBytes is the order the paper
// gives; putting AddRoundKey before InvMixColumn is the standard inverse
// cipher, which lets the unmodified round keys be used.
//
// Interface: state_in and round_key in, state_out out. No clock: the
// pipeline register is in aes_decrypt.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t subbed, keyed;

  sub_shift_rows #(.INVERSE(1'b1)) u_shift_sub (.state_in(state_in), .state_out(subbed));

  assign keyed = subbed ^ round_key;

  if (FINAL) begin : g_no_mix
    assign state_out = keyed;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      inv_mix_column u_imix (
        .col_in  (keyed[127 - 32*c -: 32]),
        .col_out (state_out[127 - 32*c -: 32])
      );
    end
  end

endmodule
