// inv_mix_column: the enhanced InvMixColumn of one state column.
//
// The inverse matrix has the costly coefficients {0e}, {0b}, {0d} and {09}.
// All four are sums of only three products that every input byte needs:
//   {0e} = {09}^{04}^{02}^{01},  {0b} = {09}^{02},  {0d} = {09}^{04}
// So for each input byte s_j the unit forms c09 = {09} s_j, c04 = {04} s_j
// and c02 = {02} s_j once (twelve small product units for the column) and
// builds the four output bytes from XORs of these shared terms:
//   s0' = 0e s0 ^ 0b s1 ^ 0d s2 ^ 09 s3
//   s1' = 09 s0 ^ 0e s1 ^ 0b s2 ^ 0d s3
//   s2' = 0d s0 ^ 09 s1 ^ 0e s2 ^ 0b s3
//   s3' = 0b s0 ^ 0d s1 ^ 09 s2 ^ 0e s3
// {09} and {04} use "reduced xtime": the product is the plain shift
// (b << 3 or b << 2) plus a reduction term t made only of the bits shifted
// out (b7..b5 or b7..b6), written out bit by bit below; {09} adds b itself.
// {02} is the usual xtime. The sharing scheme and the reduction terms follow
// the paper; the coefficient of every output term follows the standard
// inverse matrix.
//
// Interface: col_in (s0 in bits 31:24) in, col_out out. Combinational.
module inv_mix_column
  import aes_pkg::*;
(
  input  column_t col_in,
  output column_t col_out
);

  // {09} * b: b*x^3 reduced, plus b
  function automatic gf8_t mul09(gf8_t b);
    gf8_t t;
    t[7] = 1'b0;
    t[6] = b[7];
    t[5] = b[6] ^ b[7];
    t[4] = b[5] ^ b[6];
    t[3] = b[5] ^ b[7];
    t[2] = t[5];
    t[1] = t[4];
    t[0] = b[5];
    return {b[4:0], 3'b000} ^ t ^ b;
  endfunction

  // {04} * b: b*x^2 reduced
  function automatic gf8_t mul04(gf8_t b);
    gf8_t t;
    t[7] = 1'b0;
    t[6] = 1'b0;
    t[5] = b[7];
    t[4] = b[7] ^ b[6];
    t[3] = b[6];
    t[2] = b[7];
    t[1] = t[4];
    t[0] = b[6];
    return {b[5:0], 2'b00} ^ t;
  endfunction

  gf8_t s   [4];
  gf8_t c09 [4];
  gf8_t c04 [4];
  gf8_t c02 [4];
  gf8_t m0e [4];   // {0e} s_j
  gf8_t m0b [4];   // {0b} s_j
  gf8_t m0d [4];   // {0d} s_j

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      s[j]   = col_in[31 - 8*j -: 8];
      c09[j] = mul09(s[j]);
      c04[j] = mul04(s[j]);
      c02[j] = xtime(s[j]);
      m0e[j] = c09[j] ^ c04[j] ^ c02[j] ^ s[j];
      m0b[j] = c09[j] ^ c02[j];
      m0d[j] = c09[j] ^ c04[j];
    end
  end

  assign col_out[31:24] = m0e[0] ^ m0b[1] ^ m0d[2] ^ c09[3];
  assign col_out[23:16] = c09[0] ^ m0e[1] ^ m0b[2] ^ m0d[3];
  assign col_out[15:8]  = m0d[0] ^ c09[1] ^ m0e[2] ^ m0b[3];
  assign col_out[7:0]   = m0b[0] ^ m0d[1] ^ c09[2] ^ m0e[3];

endmodule
