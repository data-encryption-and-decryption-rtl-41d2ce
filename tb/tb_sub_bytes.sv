// tb_sub_bytes: random states through SubBytes and InvSubBytes, compared
// byte by byte with the reference tables; also checks that the inverse
// undoes the forward transformation.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, fwd, bwd, round_trip;
  int checks = 0, failures = 0;

  sub_bytes #(.INV(1'b0)) dut_f (.din(din), .dout(fwd));
  sub_bytes #(.INV(1'b1)) dut_i (.din(din), .dout(bwd));
  sub_bytes #(.INV(1'b1)) dut_r (.din(fwd), .dout(round_trip));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ef, ei;
    build_tables();
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1;
      for (int k = 0; k < 16; k++) begin
        ef[8*k +: 8] = sbox_t[din[8*k +: 8]];
        ei[8*k +: 8] = isbox_t[din[8*k +: 8]];
      end
      checks += 3;
      if (fwd !== ef) begin failures++; $display("FAIL fwd %h -> %h exp %h", din, fwd, ef); end
      if (bwd !== ei) begin failures++; $display("FAIL inv %h -> %h exp %h", din, bwd, ei); end
      if (round_trip !== din) begin failures++; $display("FAIL round trip %h", din); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
