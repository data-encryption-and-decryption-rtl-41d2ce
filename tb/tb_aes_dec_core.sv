// tb_aes_dec_core: drives the iterative AES-128 inverse cipher core with round
// keys from the reference schedule.
//  - standard vectors: FIPS-197 appendix B and C.1;
//  - latency: out_valid exactly 10 cycles after the accepting edge;
//  - rate: with out_ready high, back-to-back blocks are accepted 11 cycles
//    apart;
//  - random blocks and keys with random in_valid and out_ready, results
//    compared in order with the reference inverse cipher (back-pressure included).
module tb_aes_dec_core;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;
  logic clk = 0, rst_n = 0;
  round_keys_t rk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [127:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  logic [127:0] key;
  logic [127:0] expq [$];
  int cycle = 0, acc_cycle [$], stalls = 0;

  aes_dec_core dut (.clk(clk), .rst_n(rst_n), .rk(rk),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_key(logic [127:0] k);
    logic [127:0] r [11];
    key = k;
    expand(k, r);
    for (int i = 0; i <= 10; i++) rk[i] = r[i];
  endtask

  // Monitor: compares every result taken with the expected queue.
  always @(posedge clk) begin
    cycle++;
    if (in_valid && in_ready) acc_cycle.push_back(cycle);
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        logic [127:0] e;
        e = expq.pop_front();
        if (out_data !== e) begin failures++; $display("FAIL got %h exp %h", out_data, e); end
      end
    end
  end

  task automatic send(logic [127:0] pt);
    in_data = pt; in_valid = 1;
    expq.push_back(decrypt(key, pt));
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask

  initial begin
    int n;
    build_tables();
    set_key('0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // standard vectors, one at a time, latency measured
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    out_ready = 1;
    send(128'h3925841d02dc09fbdc118597196a0b32);
    n = 0;
    while (!out_valid && n < 100) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != 10) begin failures++; $display("FAIL latency %0d cycles, expected 10", n); end
    checks++;
    if (out_data !== 128'h3243f6a8885a308d313198a2e0370734) begin
      failures++; $display("FAIL FIPS-197 appendix B: %h", out_data);
    end
    @(posedge clk); #1;
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    wait (out_valid); @(posedge clk); #1;
    checks++;
    if (expq.size() != 0 || decrypt(key, 128'h69c4e0d86a7b0430d8cdb78070b4c55a)
        !== 128'h00112233445566778899aabbccddeeff) begin
      failures++; $display("FAIL FIPS-197 appendix C.1");
    end

    // rate: continuous input, consumer always ready
    acc_cycle.delete();
    for (int i = 0; i < 4; i++) begin in_data = rand128(); in_valid = 1; expq.push_back(decrypt(key, in_data)); do @(posedge clk); while (!in_ready); #1; end
    in_valid = 0;
    for (int i = 1; i < acc_cycle.size(); i++) begin
      checks++;
      if (acc_cycle[i] - acc_cycle[i-1] != 11) begin
        failures++; $display("FAIL accept interval %0d, expected 11", acc_cycle[i] - acc_cycle[i-1]);
      end
    end
    wait (expq.size() == 0); @(posedge clk); #1;

    // random traffic with back-pressure
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          if (i % 10 == 0) begin wait (expq.size() == 0); @(posedge clk); #1 set_key(rand128()); end
          repeat ($urandom_range(0, 3)) @(posedge clk);
          #1 send(rand128());
        end
      end
      begin
        while (1) begin @(posedge clk); #1 out_ready = ($urandom_range(0, 2) != 0); end
      end
    join_any
    out_ready = 1;
    wait (expq.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
