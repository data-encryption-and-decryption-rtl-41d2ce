// shift_rows: ShiftRows (INV = 0) or InvShiftRows (INV = 1).
//
// Row r of the 4x4 state is rotated left by r byte positions (right by r
// for the inverse): row 0 stays, row 1 moves by one, row 2 by two, row 3
// by three. State byte (r, c) is byte 4*c + r, byte 0 in bits [127:120].
// This is a fixed byte permutation: every output bit is wired straight to
// an input bit and no gates are needed. Interface din -> dout, no clock.
module shift_rows
  import aes_pkg::*;
#(
  parameter bit INV = 1'b0
) (
  input  block_t din,
  output block_t dout
);
  // Byte k of a block, k = 0 being the most significant.
  function automatic byte_t get_byte(input block_t s, input int k);
    return s[127 - 8*k -: 8];
  endfunction

  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(4*c + r) -: 8] =
          get_byte(din, 4*((INV ? c + 4 - r : c + r) % 4) + r);
  end
endmodule
