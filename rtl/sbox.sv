// sbox: AES SubByte / InvSubByte for one byte, combinational logic only.
//
// Forward (inv = 0): multiplicative inverse in GF(2^8), then the affine
// transformation. Inverse (inv = 1): inverse affine transformation first,
// then the same multiplicative inverse. A single gf_inv8 instance serves
// both directions, as the design intends; a core that only needs one
// direction ties inv to a constant and synthesis removes the other path.
// The affine matrices and constants are the standard AES ones.
//
// Interface: inv, din -> dout, no clock.
module sbox
  import aes_pkg::*;
(
  input  logic  inv,
  input  byte_t din,
  output byte_t dout
);
  byte_t inv_in, inv_out;

  always_comb inv_in = inv ? affine_inv(din) : din;

  gf_inv8 u_inv (.din(inv_in), .dout(inv_out));

  always_comb dout = inv ? inv_out : affine(inv_out);
endmodule
