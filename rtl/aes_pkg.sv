// aes_pkg: types, constants and combinational arithmetic shared by the
// Triple AES datapath.
//
// The 128-bit state follows the FIPS-197 byte order: byte 0 is bits
// [127:120], and bytes fill the 4x4 state column by column, so state byte
// (row r, column c) is byte 4*c + r. Round keys travel as a packed array
// of eleven 128-bit words, index 0 being the cipher key itself.
//
// The functions below are the building blocks of the combinational S-box:
// arithmetic in GF(2^4) (addition is XOR, squaring, multiplication,
// multiplication by the constant lambda, inversion), the isomorphic
// mapping between GF(2^8) and the composite field GF((2^4)^2) and its
// inverse, and the AES affine transformation and its inverse. The
// composite field is GF(2^4)[x]/(x^2 + x + lambda) with lambda = {1100},
// and GF(2^4) is built over GF(2^2) with phi = {10}; these field choices
// and the mapping matrix are this design's own (the usual ones for a
// look-up-free AES S-box). The MixColumns helpers are also here.
package aes_pkg;

  localparam int unsigned NR = 10;           // rounds of AES-128

  typedef logic [7:0]           byte_t;
  typedef logic [127:0]         block_t;
  typedef logic [NR:0][127:0]   round_keys_t;  // [i] = round key i


  // ---------------------------------------------------------------- GF(2^2)
  function automatic logic [1:0] gf2_mul(input logic [1:0] a, input logic [1:0] b);
    logic hi;
    hi = (a[1] & b[1]) ^ (a[1] & b[0]) ^ (a[0] & b[1]);
    return {hi, (a[1] & b[1]) ^ (a[0] & b[0])};
  endfunction

  // Multiply by phi = {10} in GF(2^2).
  function automatic logic [1:0] gf2_mul_phi(input logic [1:0] a);
    return {a[1] ^ a[0], a[1]};
  endfunction

  // ---------------------------------------------------------------- GF(2^4)
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh, h, l;
    hh = gf2_mul(a[3:2], b[3:2]);
    h  = hh ^ gf2_mul(a[3:2], b[1:0]) ^ gf2_mul(a[1:0], b[3:2]);
    l  = gf2_mul_phi(hh) ^ gf2_mul(a[1:0], b[1:0]);
    return {h, l};
  endfunction

  function automatic logic [3:0] gf4_square(input logic [3:0] q);
    return {q[3], q[3] ^ q[2], q[2] ^ q[1], q[3] ^ q[1] ^ q[0]};
  endfunction

  // Multiply by lambda = {1100}.
  function automatic logic [3:0] gf4_mul_lambda(input logic [3:0] q);
    return {q[2] ^ q[0], q[3] ^ q[2] ^ q[1] ^ q[0], q[3], q[2]};
  endfunction

  // Inversion in GF(2^4), written out as sum-of-products (0 maps to 0).
  function automatic logic [3:0] gf4_inv(input logic [3:0] q);
    logic [3:0] r;
    r[3] = q[3] ^ (q[3] & q[2] & q[1]) ^ (q[3] & q[0]) ^ q[2];
    r[2] = (q[3] & q[2] & q[1]) ^ (q[3] & q[2] & q[0]) ^ (q[3] & q[0]) ^ q[2]
         ^ (q[2] & q[1]);
    r[1] = q[3] ^ (q[3] & q[2] & q[1]) ^ (q[3] & q[1] & q[0]) ^ q[2]
         ^ (q[2] & q[0]) ^ q[1];
    r[0] = (q[3] & q[2] & q[1]) ^ (q[3] & q[2] & q[0]) ^ (q[3] & q[1])
         ^ (q[3] & q[1] & q[0]) ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1])
         ^ (q[2] & q[1] & q[0]) ^ q[1] ^ q[0];
    return r;
  endfunction

  // ------------------------------------------------- isomorphic mappings
  // GF(2^8) (AES polynomial) -> GF((2^4)^2); result = {high nibble, low nibble}.
  function automatic byte_t iso_map(input byte_t q);
    byte_t r;
    r[7] = q[7] ^ q[5];
    r[6] = q[7] ^ q[6] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    r[5] = q[7] ^ q[5] ^ q[3] ^ q[2];
    r[4] = q[7] ^ q[5] ^ q[3] ^ q[2] ^ q[1];
    r[3] = q[7] ^ q[6] ^ q[2] ^ q[1];
    r[2] = q[7] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    r[1] = q[6] ^ q[4] ^ q[1];
    r[0] = q[6] ^ q[1] ^ q[0];
    return r;
  endfunction

  // GF((2^4)^2) -> GF(2^8).
  function automatic byte_t iso_map_inv(input byte_t q);
    byte_t r;
    r[7] = q[7] ^ q[6] ^ q[5] ^ q[1];
    r[6] = q[6] ^ q[2];
    r[5] = q[6] ^ q[5] ^ q[1];
    r[4] = q[6] ^ q[5] ^ q[4] ^ q[2] ^ q[1];
    r[3] = q[5] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    r[2] = q[7] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    r[1] = q[5] ^ q[4];
    r[0] = q[6] ^ q[5] ^ q[4] ^ q[2] ^ q[0];
    return r;
  endfunction

  // ------------------------------------------------------ affine transforms
  // b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63.
  function automatic byte_t affine(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  // b'_i = b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i, d = 0x05.
  function automatic byte_t affine_inv(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i + 2) % 8] ^ b[(i + 5) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h05;
  endfunction

  // --------------------------------------------------------- MixColumns
  // Multiply by {02} modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Column = {s0, s1, s2, s3} with s0 in bits [31:24] (row 0).
  function automatic logic [31:0] mix_column(input logic [31:0] col);
    byte_t s0, s1, s2, s3;
    {s0, s1, s2, s3} = col;
    return {xtime(s0) ^ xtime(s1) ^ s1 ^ s2 ^ s3,
            s0 ^ xtime(s1) ^ xtime(s2) ^ s2 ^ s3,
            s0 ^ s1 ^ xtime(s2) ^ xtime(s3) ^ s3,
            xtime(s0) ^ s0 ^ s1 ^ s2 ^ xtime(s3)};
  endfunction

  // Inverse: the inverse matrix {0e,0b,0d,09} equals the forward matrix
  // times {05,00,04,00}, so a cheap pre-multiplication reuses mix_column.
  function automatic logic [31:0] inv_mix_column(input logic [31:0] col);
    byte_t s0, s1, s2, s3, u, v;
    {s0, s1, s2, s3} = col;
    u = xtime(xtime(s0 ^ s2));
    v = xtime(xtime(s1 ^ s3));
    return mix_column({s0 ^ u, s1 ^ v, s2 ^ u, s3 ^ v});
  endfunction

endpackage
