// key_expansion: AES-128 key schedule, one round key per clock.
//
// A pulse on load (with the cipher key on key) stores the key as round key
// 0 and starts the expansion; each following cycle derives round key i
// from round key i-1:
//   t  = SubWord(RotWord(w3)) ^ {rcon_i, 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// with rcon starting at 01 and doubled in GF(2^8) every round. SubWord uses
// four of the combinational S-boxes. After NR = 10 cycles all eleven round
// keys are held in registers and ready goes high; they stay valid until the
// next load. Storing every round key lets the encryption cores read them
// in order and the decryption cores in reverse order. The schedule is the
// standard AES-128 one; the one-key-per-cycle timing and the stored key
// table are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), load, key -> ready, rk.
// Timing: ready falls at the clock edge that samples load and rises
// NR = 10 clock edges later.
module key_expansion
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  block_t      key,
  output logic        ready,
  output round_keys_t rk
);
  round_keys_t rk_q;
  block_t      last_q;          // most recent round key
  byte_t       rcon_q;
  logic [3:0]  idx_q;           // index of the round key being produced
  logic        busy_q, ready_q;

  logic [31:0] rot, sub, t;
  block_t      next_key;

  assign rot = {last_q[23:0], last_q[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    sbox u_sbox (.inv(1'b0), .din(rot[8*i +: 8]), .dout(sub[8*i +: 8]));
  end

  always_comb begin
    t = sub ^ {rcon_q, 24'h0};
    next_key[127:96] = last_q[127:96] ^ t;
    next_key[95:64]  = last_q[95:64]  ^ next_key[127:96];
    next_key[63:32]  = last_q[63:32]  ^ next_key[95:64];
    next_key[31:0]   = last_q[31:0]   ^ next_key[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk_q    <= '0;
      last_q  <= '0;
      rcon_q  <= 8'h01;
      idx_q   <= '0;
      busy_q  <= 1'b0;
      ready_q <= 1'b0;
    end else if (load) begin
      rk_q[0] <= key;
      last_q  <= key;
      rcon_q  <= 8'h01;
      idx_q   <= 4'd1;
      busy_q  <= 1'b1;
      ready_q <= 1'b0;
    end else if (busy_q) begin
      rk_q[idx_q] <= next_key;
      last_q      <= next_key;
      rcon_q      <= xtime(rcon_q);
      idx_q       <= idx_q + 4'd1;
      if (idx_q == 4'(NR)) begin
        busy_q  <= 1'b0;
        ready_q <= 1'b1;
      end
    end
  end

  assign ready = ready_q;
  assign rk    = rk_q;
endmodule
