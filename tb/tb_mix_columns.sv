// tb_mix_columns: MixColumns and InvMixColumns on random states against a
// reference built from a generic GF(2^8) multiplier, plus the standard
// column example db 13 53 45 -> 8e 4d a1 bc.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, fwd, bwd;
  int checks = 0, failures = 0;

  mix_columns #(.INV(1'b0)) dut_f (.din(din), .dout(fwd));
  mix_columns #(.INV(1'b1)) dut_i (.din(din), .dout(bwd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t s, ef, ei;
    din = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6};
    #1;
    checks++;
    if (fwd !== {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}) begin
      failures++; $display("FAIL standard example: %h", fwd);
    end
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1;
      s = to_st(din);
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
        ef[r][c] = gmul(8'h02, s[r][c]) ^ gmul(8'h03, s[(r+1)%4][c]) ^ s[(r+2)%4][c] ^ s[(r+3)%4][c];
        ei[r][c] = gmul(8'h0e, s[r][c]) ^ gmul(8'h0b, s[(r+1)%4][c])
                 ^ gmul(8'h0d, s[(r+2)%4][c]) ^ gmul(8'h09, s[(r+3)%4][c]);
      end
      checks += 2;
      if (fwd !== from_st(ef)) begin failures++; $display("FAIL fwd %h -> %h", din, fwd); end
      if (bwd !== from_st(ei)) begin failures++; $display("FAIL inv %h -> %h", din, bwd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
