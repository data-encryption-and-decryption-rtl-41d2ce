// taes_top: Triple AES (TAES) with two 128-bit keys, encryption and
// decryption side by side.
//
// A 128-bit block is encrypted three times with AES-128 using two keys,
// K1 and K2; both parties hold both keys, and both are needed to recover
// the data. By default the first and second encryptions use K2 and the
// third K1 (STAGE_KEY2 = 3'b011, bit s set meaning stage s uses K2);
// decryption applies the inverse ciphers in the opposite order.
//
// Structure: two key_expansion units turn K1 and K2 into round keys, which
// the encryption chain (taes_encrypt) and the decryption chain
// (taes_decrypt) share. Each chain is three iterative AES cores linked by
// valid/ready handshakes, so up to three blocks are in flight per chain.
// S-boxes are combinational logic (composite-field inversion), with no
// look-up tables.
//
// Usage: pulse key_load with key1/key2 applied; keys_ready rises 11 cycles
// later. Then blocks are pushed on pt_* (plaintext in) and come out on
// ct_* (ciphertext), and ciphertext pushed on dct_* comes out on dpt_*.
// Keys may be reloaded only when no block is in either chain. Reset
// (rst_n, asynchronous, active low) empties both chains.
// Timing: 32 cycles from an accepted block to its result, one block per
// 11 cycles per chain without back-pressure.
module taes_top
  import aes_pkg::*;
#(
  parameter logic [2:0] STAGE_KEY2 = 3'b011
) (
  input  logic   clk,
  input  logic   rst_n,
  // keys
  input  logic   key_load,
  input  block_t key1,
  input  block_t key2,
  output logic   keys_ready,
  // encryption: plaintext in, ciphertext out
  input  logic   pt_valid,
  output logic   pt_ready,
  input  block_t pt_data,
  output logic   ct_valid,
  input  logic   ct_ready,
  output block_t ct_data,
  // decryption: ciphertext in, plaintext out
  input  logic   dct_valid,
  output logic   dct_ready,
  input  block_t dct_data,
  output logic   dpt_valid,
  input  logic   dpt_ready,
  output block_t dpt_data
);
  round_keys_t rk1, rk2;
  logic        ready1, ready2;

  key_expansion u_key1 (.clk(clk), .rst_n(rst_n), .load(key_load), .key(key1),
                        .ready(ready1), .rk(rk1));
  key_expansion u_key2 (.clk(clk), .rst_n(rst_n), .load(key_load), .key(key2),
                        .ready(ready2), .rk(rk2));

  assign keys_ready = ready1 && ready2;

  taes_encrypt #(.STAGE_KEY2(STAGE_KEY2)) u_enc (
    .clk(clk), .rst_n(rst_n), .keys_ready(keys_ready), .rk1(rk1), .rk2(rk2),
    .in_valid(pt_valid), .in_ready(pt_ready), .in_data(pt_data),
    .out_valid(ct_valid), .out_ready(ct_ready), .out_data(ct_data)
  );

  taes_decrypt #(.STAGE_KEY2(STAGE_KEY2)) u_dec (
    .clk(clk), .rst_n(rst_n), .keys_ready(keys_ready), .rk1(rk1), .rk2(rk2),
    .in_valid(dct_valid), .in_ready(dct_ready), .in_data(dct_data),
    .out_valid(dpt_valid), .out_ready(dpt_ready), .out_data(dpt_data)
  );
endmodule
