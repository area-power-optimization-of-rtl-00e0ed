// gf4_inv: multiplicative inverse in GF(2^4), represented as GF((2^2)^2).
//
// For a = h*y + l with y^2 = y + phi (phi = {10}):
//   a^-1 = (h*y + (h^l)) * d^-1,   d = phi*h^2 ^ h*l ^ l^2   (d in GF(2^2))
// In GF(2^2) the inverse of a nonzero element is its square, and squaring is
// linear: (a1 x + a0)^2 = a1 x + (a1^a0). Zero maps to zero, as the S-box
// needs. The paper names this unit inside the multiplicative inverse but
// does not draw it; the structure here is this design's choice.
//
// Interface: a in, a_inv out. Purely combinational.
module gf4_inv
  import aes_pkg::*;
(
  input  gf4_t a,
  output gf4_t a_inv
);

  function automatic logic [1:0] gf2_mul(logic [1:0] x, logic [1:0] z);
    logic hh;
    hh = x[1] & z[1];
    return {(x[1] & z[0]) ^ (x[0] & z[1]) ^ hh, (x[0] & z[0]) ^ hh};
  endfunction

  function automatic logic [1:0] gf2_sq(logic [1:0] x);
    return {x[1], x[1] ^ x[0]};
  endfunction

  function automatic logic [1:0] gf2_mul_phi(logic [1:0] x);
    return {x[1] ^ x[0], x[1]};
  endfunction

  logic [1:0] h, l, hl, d, d_inv;

  assign h     = a[3:2];
  assign l     = a[1:0];
  assign hl    = h ^ l;
  assign d     = gf2_mul_phi(gf2_sq(h)) ^ gf2_mul(h, l) ^ gf2_sq(l);
  assign d_inv = gf2_sq(d);

  assign a_inv = {gf2_mul(h, d_inv), gf2_mul(hl, d_inv)};

endmodule
