// tb_shift_rows: ShiftRows and InvShiftRows on random states against a
// row/column reference, plus the FIPS-197 round-1 example
// (d42711ae e0bf98f1 b8b45de5 1e415230 -> d4bf5d30 e0b452ae b84111f1 1e2798e5).
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, fwd, bwd;
  int checks = 0, failures = 0;

  shift_rows #(.INV(1'b0)) dut_f (.din(din), .dout(fwd));
  shift_rows #(.INV(1'b1)) dut_i (.din(din), .dout(bwd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t s, ef, ei;
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    checks++;
    if (fwd !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin
      failures++; $display("FAIL standard example: %h", fwd);
    end
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1;
      s = to_st(din);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        ef[r][c] = s[r][(c + r) % 4];
        ei[r][(c + r) % 4] = s[r][c];
      end
      checks += 2;
      if (fwd !== from_st(ef)) begin failures++; $display("FAIL fwd %h -> %h", din, fwd); end
      if (bwd !== from_st(ei)) begin failures++; $display("FAIL inv %h -> %h", din, bwd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
