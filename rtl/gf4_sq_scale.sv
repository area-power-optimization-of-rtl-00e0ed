// gf4_sq_scale: squaring in GF(2^4) followed by multiplication by lambda,
// merged into one three-XOR circuit.
//
// Inside the composite-field inverse, lambda*ah^2 is needed. Written as two
// separate linear maps (squaring: k3=q3, k2=q3^q2, k1=q2^q1, k0=q3^q1^q0,
// then the lambda = {1000} product: K3=k0^k1^k2^k3, K2=k1^k3, K1=k2,
// K0=k2^k3) it takes nine two-input XORs. Substituting one into the other
// cancels most terms and leaves K3 = q0^q3, K2 = q1^h, K1 = h, K0 = q2 with the shared term
// h = q2^q3: three XOR gates. These equations are the paper's; the
// surrounding field is GF((2^2)^2) with x^2+x+1 and phi = {10}.
//
// Interface: q in, k = lambda*q^2 out. Purely combinational, no clock.
module gf4_sq_scale
  import aes_pkg::*;
(
  input  gf4_t q,
  output gf4_t k
);

  logic h;

  assign h    = q[2] ^ q[3];
  assign k[3] = q[0] ^ q[3];
  assign k[2] = q[1] ^ h;
  assign k[1] = h;
  assign k[0] = q[2];

endmodule
