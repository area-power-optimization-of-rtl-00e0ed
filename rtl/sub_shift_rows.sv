// sub_shift_rows: SubBytes followed by ShiftRows (INVERSE = 0), or
// InvShiftRows followed by InvSubBytes (INVERSE = 1), on a whole state.
//
// Sixteen composite-field S-boxes (composite_sbox) substitute the bytes;
// row r of the state is rotated by r byte positions, to the left for the
// cipher and to the right for the inverse cipher. With the FIPS-197 byte
// order (byte r+4c is row r, column c, byte 0 in bits 127:120):
//   forward: out[r][c] = S(in[r][(c + r) mod 4])
//   inverse: out[r][c] = S^-1(in[r][(c - r) mod 4])
// The rotation is wiring only. Because both steps act byte by byte and by
// position, their order does not change the result; the inverse variant is
// written in the order the paper gives (InvShiftRows, then the inverse
// S-box).
//
// Interface: state_in in, state_out out. Combinational.
module sub_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  block_t shifted_in;

  // byte r+4c of shifted_in is the byte the rotation brings to row r, column c
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        int src_c;
        src_c = INVERSE ? ((c + 4 - r) % 4) : ((c + r) % 4);
        shifted_in[127 - 8*(r + 4*c) -: 8] = state_in[127 - 8*(r + 4*src_c) -: 8];
      end
    end
  end

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    composite_sbox #(.INVERSE(INVERSE)) u_sbox (
      .din  (shifted_in[127 - 8*i -: 8]),
      .dout (state_out[127 - 8*i -: 8])
    );
  end

endmodule
