// taes_decrypt: Triple AES decryption, three AES-128 inverse-cipher stages.
//
// Decryption undoes the encryption chain in inverse order: stage 0 runs the
// inverse cipher with the key of the last encryption stage, stage 2 with
// the key of the first. STAGE_KEY2 is given in encryption order (bit s set:
// encryption stage s used K2), so the same value is given to taes_encrypt
// and taes_decrypt; the default 3'b011 decrypts with K1, K2, K2.
//
// Every stage is an iterative aes_dec_core linked to the next by a
// valid/ready handshake; as in encryption, up to three blocks are in flight
// and a held-off consumer stalls the chain. Input is refused until
// keys_ready is high.
//
// Interface: clk, rst_n (asynchronous, active low), keys_ready, rk1/rk2,
// in_valid/in_ready/in_data (ciphertext), out_valid/out_ready/out_data
// (plaintext).
// Timing: 32 cycles from acceptance to out_valid; a new block every 11
// cycles without stalls.
module taes_decrypt
  import aes_pkg::*;
#(
  parameter logic [2:0] STAGE_KEY2 = 3'b011
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        keys_ready,
  input  round_keys_t rk1,
  input  round_keys_t rk2,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output block_t      out_data
);
  // Handshake between stages: index s is the input of stage s, index 3 the
  // output of the chain.
  logic   [3:0] valid, ready;
  block_t       data [4];

  assign valid[0]  = in_valid && keys_ready;
  assign in_ready  = ready[0] && keys_ready;
  assign data[0]   = in_data;
  assign out_valid = valid[3];
  assign ready[3]  = out_ready;
  assign out_data  = data[3];

  for (genvar s = 0; s < 3; s++) begin : g_stage
    aes_dec_core u_core (
      .clk       (clk),
      .rst_n     (rst_n),
      .rk        (STAGE_KEY2[2 - s] ? rk2 : rk1),
      .in_valid  (valid[s]),
      .in_ready  (ready[s]),
      .in_data   (data[s]),
      .out_valid (valid[s+1]),
      .out_ready (ready[s+1]),
      .out_data  (data[s+1])
    );
  end
endmodule
