// mix_columns: MixColumns (INV = 0) or InvMixColumns (INV = 1).
//
// Each of the four state columns is multiplied, independently of the
// others, by the fixed invertible matrix {02 03 01 01} (rotated per row)
// over GF(2^8); the inverse uses {0e 0b 0d 09}, built here as a small
// pre-multiplication followed by the forward matrix (see aes_pkg).
// Column c is bits [127-32c -: 32]. Interface din -> dout, no clock.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit INV = 1'b0
) (
  input  block_t din,
  output block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    assign dout[127 - 32*c -: 32] = INV ? inv_mix_column(din[127 - 32*c -: 32])
                                        : mix_column(din[127 - 32*c -: 32]);
  end
endmodule
