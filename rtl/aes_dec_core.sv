// aes_dec_core: iterative AES-128 inverse cipher, one round per clock.
//
// A block is accepted on in_valid && in_ready and round key NR = 10 is
// XORed in as it is stored. Each of the next NR cycles applies one inverse
// round, InvShiftRows -> InvSubBytes -> AddRoundKey with round key r ->
// InvMixColumns, for r = 9 down to 0, InvMixColumns being skipped for
// r = 0. This is the plain inverse cipher, so it uses the same round keys
// as the encryption core, in reverse order. The result is held on out_data
// with out_valid high until out_ready; a new block is accepted in the cycle
// the result is taken. InvSubBytes shares the combinational multiplicative
// inverse of the forward S-box. The round structure follows the standard;
// handshake and timing are this design's own and match aes_enc_core.
//
// Interface: clk, rst_n (asynchronous, active low), rk (11 round keys),
// in_valid/in_ready/in_data, out_valid/out_ready/out_data.
// Timing: out_valid rises NR = 10 cycles after the accepting edge; a new
// block every NR + 1 = 11 cycles when out_ready stays high.
module aes_dec_core
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
  logic [3:0] round_q;          // round key used in the next step
  logic       busy_q, out_valid_q;

  block_t isr, isb, ark, imc;

  shift_rows    #(.INV(1'b1)) u_isr (.din(state_q), .dout(isr));
  sub_bytes     #(.INV(1'b1)) u_isb (.din(isr), .dout(isb));
  add_round_key               u_ark (.din(isb), .rk(rk[round_q]), .dout(ark));
  mix_columns   #(.INV(1'b1)) u_imc (.din(ark), .dout(imc));

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
      state_q <= (round_q == 4'd0) ? ark : imc;
      round_q <= round_q - 4'd1;
      if (round_q == 4'd0) begin
        busy_q      <= 1'b0;
        out_valid_q <= 1'b1;
      end
    end else if (in_valid && in_ready) begin
      state_q     <= in_data ^ rk[NR];
      round_q     <= 4'(NR - 1);
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
