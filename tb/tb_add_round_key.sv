// tb_add_round_key: random states and keys, result compared with a
// byte-by-byte XOR, plus the FIPS-197 initial-round example.
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, rk, dout;
  int checks = 0, failures = 0;

  add_round_key dut (.din(din), .rk(rk), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp;
    din = 128'h3243f6a8885a308d313198a2e0370734;
    rk  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin
      failures++; $display("FAIL standard example: %h", dout);
    end
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      rk  = rand128();
      #1;
      for (int k = 0; k < 16; k++) exp[8*k +: 8] = din[8*k +: 8] ^ rk[8*k +: 8];
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL %h ^ %h -> %h", din, rk, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
