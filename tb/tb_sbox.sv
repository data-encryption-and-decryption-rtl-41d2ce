// tb_sbox: exhaustive test of the S-box in both directions against a
// brute-force reference table, plus two values from the AES standard
// (S(53) = ed, S^-1(ed) = 53).
module tb_sbox;
  import aes_ref_pkg::*;
  logic       inv;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  sbox dut (.inv(inv), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic i, logic [7:0] x, logic [7:0] exp);
    inv = i; din = x;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL inv=%0d x=%02h got %02h exp %02h", i, x, dout, exp);
    end
  endtask

  initial begin
    build_tables();
    check(1'b0, 8'h53, 8'hed);
    check(1'b1, 8'hed, 8'h53);
    for (int x = 0; x < 256; x++) begin
      check(1'b0, 8'(x), sbox_t[x]);
      check(1'b1, 8'(x), isbox_t[x]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
