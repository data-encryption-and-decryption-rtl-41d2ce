// taes_encrypt: Triple AES encryption, three AES-128 cipher stages in series.
//
// The plaintext goes through stage 0, its result through stage 1 and that
// result through stage 2. Bit s of STAGE_KEY2 chooses the key of stage s:
// 1 for K2, 0 for K1. The default 3'b011 gives the order K2, K2, K1 (first
// stage K2, second K2, third K1); 3'b010 gives K1, K2, K1.
//
// Every stage is an iterative aes_enc_core. A stage hands its block to the
// next one and takes a new block in the same cycle, so while one block is
// in its second encryption the next is already in its first: up to three
// blocks are in flight. Stages are linked by valid/ready handshakes, so a
// consumer that holds out_ready low stalls the chain back to the input.
// Input is refused until keys_ready is high.
//
// Interface: clk, rst_n (asynchronous, active low), keys_ready, rk1/rk2
// (round keys of K1 and K2), in_valid/in_ready/in_data (plaintext),
// out_valid/out_ready/out_data (ciphertext).
// Timing: a block leaves 3 * (NR + 1) - 1 = 32 cycles after it is accepted
// (10 cycles per stage plus one handover cycle between stages); with no
// stall a new block is accepted every 11 cycles.
module taes_encrypt
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
    aes_enc_core u_core (
      .clk       (clk),
      .rst_n     (rst_n),
      .rk        (STAGE_KEY2[s] ? rk2 : rk1),
      .in_valid  (valid[s]),
      .in_ready  (ready[s]),
      .in_data   (data[s]),
      .out_valid (valid[s+1]),
      .out_ready (ready[s+1]),
      .out_data  (data[s+1])
    );
  end
endmodule
