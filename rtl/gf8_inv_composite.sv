// gf8_inv_composite: multiplicative inverse in GF((2^4)^2), the core of the
// composite-field S-box.
//
// An element is a = ah*z + al with ah, al in GF(2^4) and z^2 = z + lambda,
// lambda = {1000}. Its inverse is
//   a^-1 = (ah*z + (ah^al)) * d^-1,   d = lambda*ah^2 ^ (ah^al)*al
// (the second term expands to ah*al ^ al^2). The term lambda*ah^2 comes
// from the three-XOR combined square-and-scale circuit (gf4_sq_scale), which
// is the area saving this S-box is built around. Then one GF(2^4) inverse
// and two output multipliers finish the job. Zero maps to zero.
//
// The paper describes this unit as squaring, scaling by lambda, and the
// multiplications around them. The exact data flow (one multiplier for
// (ah^al)*al, two for the outputs) is this design's choice.
//
// Interface: a in (high nibble in bits 7:4), a_inv out. Purely combinational.
module gf8_inv_composite
  import aes_pkg::*;
(
  input  gf8_t a,
  output gf8_t a_inv
);

  gf4_t ah, al, hl, sq_scaled, mixed_term, d, d_inv, out_h, out_l;

  assign ah = a[7:4];
  assign al = a[3:0];
  assign hl = ah ^ al;

  gf4_sq_scale u_sq_scale (.q(ah), .k(sq_scaled));
  gf4_mul      u_mul_mixed (.a(hl), .b(al), .p(mixed_term));

  assign d = sq_scaled ^ mixed_term;

  gf4_inv      u_inv   (.a(d), .a_inv(d_inv));
  gf4_mul      u_mul_h (.a(ah), .b(d_inv), .p(out_h));
  gf4_mul      u_mul_l (.a(hl), .b(d_inv), .p(out_l));

  assign a_inv = {out_h, out_l};

endmodule
