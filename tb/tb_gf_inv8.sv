// tb_gf_inv8: exhaustive test of the GF(2^8) inverse. For every byte the
// product with the result, computed by a shift-and-add multiplier, must be
// 1 (and 0 must map to 0).
module tb_gf_inv8;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  gf_inv8 dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      din = 8'(x);
      #1;
      checks++;
      if (x == 0 ? dout != 0 : gmul(din, dout) != 8'h01) begin
        failures++;
        $display("FAIL inv(%02h) = %02h", din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
