// gf4_mul: multiplier in GF(2^4), represented as GF((2^2)^2).
//
// An element is {h, l} = h*y + l with h, l in GF(2^2) (GF(2^2) taken modulo
// x^2+x+1) and y^2 = y + phi, phi = {10}. The product uses three GF(2^2)
// multipliers (Karatsuba form):
//   hi = (ah^al)(bh^bl) ^ al*bl
//   lo = al*bl ^ phi*(ah*bh)
// This is the multiplier that appears three times in the composite
// multiplicative inverse. The paper only names it; this gate structure is
// a common textbook choice, picked to match the field the paper's
// squaring equations fix.
//
// Interface: a, b in, p = a*b out. Purely combinational.
module gf4_mul
  import aes_pkg::*;
(
  input  gf4_t a,
  input  gf4_t b,
  output gf4_t p
);

  // GF(2^2) product modulo x^2+x+1
  function automatic logic [1:0] gf2_mul(logic [1:0] x, logic [1:0] z);
    logic hh;
    hh = x[1] & z[1];
    return {(x[1] & z[0]) ^ (x[0] & z[1]) ^ hh, (x[0] & z[0]) ^ hh};
  endfunction

  // multiplication by phi = {10} in GF(2^2)
  function automatic logic [1:0] gf2_mul_phi(logic [1:0] x);
    return {x[1] ^ x[0], x[1]};
  endfunction

  logic [1:0] hh, ll, mid;

  assign hh  = gf2_mul(a[3:2], b[3:2]);
  assign ll  = gf2_mul(a[1:0], b[1:0]);
  assign mid = gf2_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]);

  assign p = {mid ^ ll, ll ^ gf2_mul_phi(hh)};

endmodule
