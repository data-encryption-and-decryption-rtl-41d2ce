// gf_inv8: multiplicative inverse in GF(2^8) (AES field), 0 mapping to 0,
// built from combinational logic only, with no look-up table.
//
// The input byte is mapped into the composite field GF((2^4)^2), where an
// element is b*x + c with b, c in GF(2^4) and x^2 + x + lambda = 0. There
//   (b*x + c)^-1 = b*d^-1 * x + (c + b)*d^-1,   d = b^2*lambda + b*c + c^2
// (the general form b(b^2 B + bcA + c^2)^-1 x + (c + bA)(b^2 B + bcA + c^2)^-1
// with A = 1, B = lambda). So one 8-bit inversion becomes one 4-bit
// inversion, three 4-bit multiplications, a squaring, a constant multiply
// and XORs; the result is mapped back to GF(2^8). The structure follows the
// multiplicative-inversion module of the design; the field constants and
// mapping matrix are this design's choice (see aes_pkg).
//
// Interface: din -> dout, purely combinational, no clock.
module gf_inv8
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);
  byte_t      m;        // input in the composite field
  logic [3:0] b, c;     // high and low GF(2^4) halves
  logic [3:0] d, d_inv;

  always_comb begin
    m     = iso_map(din);
    b     = m[7:4];
    c     = m[3:0];
    d     = gf4_mul_lambda(gf4_square(b)) ^ gf4_mul(b ^ c, c);
    d_inv = gf4_inv(d);
    dout  = iso_map_inv({gf4_mul(b, d_inv), gf4_mul(b ^ c, d_inv)});
  end
endmodule
