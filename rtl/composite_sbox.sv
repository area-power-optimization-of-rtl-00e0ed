// composite_sbox: AES S-box (INVERSE = 0) or inverse S-box (INVERSE = 1)
// computed in the composite field instead of a 256-entry table.
//
// Forward: map the byte into GF(((2^2)^2)^2), invert it there
// (gf8_inv_composite), then apply one 8x8 XOR matrix that merges the map
// back to the polynomial basis with the linear part of the affine transform,
// and add {63}.
// Inverse: remove {63}, apply one matrix merging the inverse affine
// transform with the map into the composite field, invert, map back.
// The same inverter serves both directions, as the paper intends for
// encryption and decryption. The matrices themselves (aes_pkg) are derived
// for this design's tower of fields.
//
// Interface: din in, dout out. Purely combinational.
module composite_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  gf8_t din,
  output gf8_t dout
);

  gf8_t to_inv, from_inv;

  generate
    if (INVERSE) begin : g_inverse
      assign to_inv = gf_mat_mul(INV_AFFINE_TO_COMPOSITE, din ^ AFFINE_CONST);
      assign dout   = gf_mat_mul(MAP_FROM_COMPOSITE, from_inv);
    end else begin : g_forward
      assign to_inv = gf_mat_mul(MAP_TO_COMPOSITE, din);
      assign dout   = gf_mat_mul(AFFINE_FROM_COMPOSITE, from_inv) ^ AFFINE_CONST;
    end
  endgenerate

  gf8_inv_composite u_inv (.a(to_inv), .a_inv(from_inv));

endmodule
