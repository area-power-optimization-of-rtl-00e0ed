// aes_pkg: types, constants and small GF(2^8) helpers shared by the AES-128
// datapath.
//
// A block is 128 bits in FIPS-197 order: byte 0 sits in bits 127:120 and the
// state is filled column by column, so state row r, column c is byte r+4c.
// The constant matrices map a byte between the AES polynomial basis
// (m(z) = z^8+z^4+z^3+z+1) and the composite field GF(((2^2)^2)^2) used by
// the S-box. The tower is GF(2^2) mod x^2+x+1, GF(2^4) mod y^2+y+phi with
// phi = {10}, and GF(2^8) mod z^2+z+lambda with lambda = {1000}; lambda is
// the constant fixed by the combined square-and-scale circuit
// (gf4_sq_scale). The maps were derived by taking {41}, a root of m(z) in
// the composite field, as the image of z. Matrices are stored as eight row
// masks, row i giving the input bits XORed into output bit i; the literals
// list row 7 first.
package aes_pkg;

  typedef logic [7:0]   gf8_t;
  typedef logic [3:0]   gf4_t;
  typedef logic [31:0]  column_t;
  typedef logic [127:0] block_t;

  // AES-128: 10 rounds, 11 round keys.
  localparam int unsigned NR_AES128 = 10;

  typedef logic [7:0][7:0] gf_matrix_t;   // [i] = row i

  // polynomial basis -> composite basis (isomorphic map delta)
  localparam gf_matrix_t MAP_TO_COMPOSITE = '{
    8'ha0, 8'hde, 8'h0c, 8'h70,
    8'h68, 8'h9c, 8'h34, 8'h03};
  // composite basis -> polynomial basis (delta^-1)
  localparam gf_matrix_t MAP_FROM_COMPOSITE = '{
    8'hba, 8'hb4, 8'h3a, 8'h9e,
    8'h86, 8'ha6, 8'hf0, 8'hf1};
  // linear part of the affine transform merged with delta^-1 (forward S-box
  // output stage; the constant {63} is added separately)
  localparam gf_matrix_t AFFINE_FROM_COMPOSITE = '{
    8'h2c, 8'h30, 8'h74, 8'hbf,
    8'h9b, 8'ha9, 8'h35, 8'h5b};
  // delta merged with the inverse of the affine transform's linear part
  // (inverse S-box input stage, applied after removing {63})
  localparam gf_matrix_t INV_AFFINE_TO_COMPOSITE = '{
    8'hc6, 8'hcf, 8'hb7, 8'hf7,
    8'h98, 8'haf, 8'h4c, 8'hed};

  localparam gf8_t AFFINE_CONST = 8'h63;

  // y = M x over GF(2)
  function automatic gf8_t gf_mat_mul(gf_matrix_t m, gf8_t x);
    gf8_t y;
    for (int i = 0; i < 8; i++) y[i] = ^(m[i] & x);
    return y;
  endfunction

  // multiplication by {02} modulo m(z)
  function automatic gf8_t xtime(gf8_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // key-schedule round constant of round r (r >= 1): {02}^(r-1)
  function automatic gf8_t rcon(int unsigned r);
    gf8_t v;
    v = 8'h01;
    for (int unsigned i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  function automatic gf8_t get_byte(block_t blk, int unsigned idx);
    return blk[127 - 8*idx -: 8];
  endfunction

endpackage
