// aes_enc_core: iterative AES-128 cipher, one round per clock.
//
// A block is accepted on in_valid && in_ready; the initial AddRoundKey
// (round key 0) is applied as it is stored. Each of the next NR = 10 cycles
// applies one round, SubBytes -> ShiftRows -> MixColumns -> AddRoundKey
// with round key r, MixColumns being skipped in the last round. The
// result is then held on out_data with out_valid high until out_ready is
// seen. The core takes a new block in the same cycle its result is taken,
// which lets several cores form a chain in which every core works on a
// different block. The round keys come from key_expansion and must stay
// constant while a block is in the core.
//
// The iterative round structure follows the design; the valid/ready
// handshake and the exact cycle timing are this design's own.
//
// Interface: clk, rst_n (asynchronous, active low), rk (11 round keys),
// in_valid/in_ready/in_data, out_valid/out_ready/out_data.
// Timing: out_valid rises NR = 10 cycles after the accepting edge; with
// out_ready held high a new block is accepted every NR + 1 = 11 cycles.
module aes_enc_core
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  round_keys_t rk,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output block_t      out_data
);
  block_t     state_q;
  logic [3:0] round_q;
  logic       busy_q, out_valid_q;

  block_t sb, sr, mc, ark;

  sub_bytes     #(.INV(1'b0)) u_sb  (.din(state_q), .dout(sb));
  shift_rows    #(.INV(1'b0)) u_sr  (.din(sb), .dout(sr));
  mix_columns   #(.INV(1'b0)) u_mc  (.din(sr), .dout(mc));
  add_round_key               u_ark (.din((round_q == 4'(NR)) ? sr : mc),
                                     .rk(rk[round_q]), .dout(ark));

  assign in_ready  = !busy_q && (!out_valid_q || out_ready);
  assign out_valid = out_valid_q;
  assign out_data  = state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= '0;
      round_q     <= '0;
      busy_q      <= 1'b0;
      out_valid_q <= 1'b0;
    end else if (busy_q) begin
      state_q <= ark;
      round_q <= round_q + 4'd1;
      if (round_q == 4'(NR)) begin
        busy_q      <= 1'b0;
        out_valid_q <= 1'b1;
      end
    end else if (in_valid && in_ready) begin
      state_q     <= in_data ^ rk[0];
      round_q     <= 4'd1;
      busy_q      <= 1'b1;
      out_valid_q <= 1'b0;
    end else if (out_valid_q && out_ready) begin
      out_valid_q <= 1'b0;
    end
  end

  // A result, once offered, stays offered and unchanged until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
