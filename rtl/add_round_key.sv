// add_round_key: AddRoundKey, the bitwise XOR of the state with a round
// key. Each 32-bit state column is combined with one word of the round
// key; all four columns are done at once here so that one round takes one
// clock. Interface din, rk -> dout, no clock.
module add_round_key
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t rk,
  output block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    assign dout[127 - 32*c -: 32] = din[127 - 32*c -: 32] ^ rk[127 - 32*c -: 32];
  end
endmodule
