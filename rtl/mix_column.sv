// mix_column: the AES MixColumn transformation of one state column.
//
// The column (s0, s1, s2, s3) is multiplied over GF(2^8) by the circulant
// matrix with first row (02 03 01 01):
//   s0' = 2 s0 ^ 3 s1 ^ s2 ^ s3        s1' = s0 ^ 2 s1 ^ 3 s2 ^ s3
//   s2' = s0 ^ s1 ^ 2 s2 ^ 3 s3        s3' = 3 s0 ^ s1 ^ s2 ^ 2 s3
// Each {02} product is one xtime (shift plus conditional XOR of {1b}) and
// {03} s = {02} s ^ s, so four xtime units serve all sixteen products.
//
// Interface: col_in (s0 in bits 31:24) in, col_out out. Combinational.
module mix_column
  import aes_pkg::*;
(
  input  column_t col_in,
  output column_t col_out
);

  gf8_t s [4];
  gf8_t d [4];   // {02} * s

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i] = col_in[31 - 8*i -: 8];
      d[i] = xtime(s[i]);
    end
  end

  assign col_out[31:24] = d[0] ^ (d[1] ^ s[1]) ^ s[2] ^ s[3];
  assign col_out[23:16] = s[0] ^ d[1] ^ (d[2] ^ s[2]) ^ s[3];
  assign col_out[15:8]  = s[0] ^ s[1] ^ d[2] ^ (d[3] ^ s[3]);
  assign col_out[7:0]   = (d[0] ^ s[0]) ^ s[1] ^ s[2] ^ d[3];

endmodule
