// sub_bytes: SubBytes (INV = 0) or InvSubBytes (INV = 1) on the whole
// 128-bit state: sixteen combinational S-boxes side by side, so a full
// round can be computed in one clock cycle.
//
// Interface: din -> dout, no clock.
module sub_bytes
  import aes_pkg::*;
#(
  parameter bit INV = 1'b0
) (
  input  block_t din,
  output block_t dout
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox u_sbox (
      .inv  (INV),
      .din  (din[8*i +: 8]),
      .dout (dout[8*i +: 8])
    );
  end
endmodule
