// tb_taes_decrypt: the three-stage Triple AES decryption chain.
//  - input is refused while keys_ready is low;
//  - latency 32 cycles from acceptance to out_valid for a lone block;
//  - with a continuous stream and an always-ready consumer a block is
//    accepted every 11 cycles and three blocks are in flight at once;
//  - random blocks with random gaps and back-pressure, compared in order
//    with the reference (three AES decryptions with K1, K2, K2);
//  - a second instance for the encryption key order K1, K2, K1 (STAGE_KEY2 = 3'b010).
module tb_taes_decrypt;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;
  localparam logic [2:0] SEL_A = 3'b011, SEL_B = 3'b010;
  logic clk = 0, rst_n = 0, keys_ready = 0;
  round_keys_t rk1, rk2;
  logic in_valid = 0, out_ready = 0;
  logic [1:0] in_ready, out_valid;
  logic [127:0] in_data = '0, out_data [2];
  logic [127:0] k1, k2;
  logic [127:0] expq [2][$];
  int checks = 0, failures = 0;
  int cycle = 0, acc_cycle [$], stalls = 0, inflight = 0, max_inflight = 0;

  taes_decrypt dut_a (.clk(clk), .rst_n(rst_n), .keys_ready(keys_ready), .rk1(rk1), .rk2(rk2),
    .in_valid(in_valid), .in_ready(in_ready[0]), .in_data(in_data),
    .out_valid(out_valid[0]), .out_ready(out_ready), .out_data(out_data[0]));
  taes_decrypt #(.STAGE_KEY2(SEL_B)) dut_b (.clk(clk), .rst_n(rst_n), .keys_ready(keys_ready),
    .rk1(rk1), .rk2(rk2),
    .in_valid(in_valid), .in_ready(in_ready[1]), .in_data(in_data),
    .out_valid(out_valid[1]), .out_ready(out_ready), .out_data(out_data[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] model(logic [2:0] sel, logic [127:0] d);
    return taes_dec(k1, k2, sel, d);
  endfunction

  task automatic set_keys(logic [127:0] a, logic [127:0] b);
    logic [127:0] r1 [11], r2 [11];
    k1 = a; k2 = b;
    expand(a, r1); expand(b, r2);
    for (int i = 0; i <= 10; i++) begin rk1[i] = r1[i]; rk2[i] = r2[i]; end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (in_valid && in_ready[0]) begin acc_cycle.push_back(cycle); inflight++; end
    if (out_valid[0] && !out_ready) stalls++;
    for (int d = 0; d < 2; d++)
      if (out_valid[d] && out_ready) begin
        logic [127:0] e;
        checks++;
        if (d == 0) inflight--;
        if (expq[d].size() == 0) begin failures++; $display("FAIL unexpected output %0d", d); end
        else begin
          e = expq[d].pop_front();
          if (out_data[d] !== e) begin failures++; $display("FAIL dut%0d got %h exp %h", d, out_data[d], e); end
        end
      end
    if (inflight > max_inflight) max_inflight = inflight;
    if (in_ready[0] !== in_ready[1]) begin failures++; $display("FAIL instances disagree on in_ready"); end
  end

  task automatic send(logic [127:0] d);
    in_data = d; in_valid = 1;
    expq[0].push_back(model(SEL_A, d));
    expq[1].push_back(model(SEL_B, d));
    do @(posedge clk); while (!in_ready[0]);
    #1 in_valid = 0;
  endtask

  initial begin
    int n;
    build_tables();
    set_keys(rand128(), rand128());
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // no keys yet: nothing may be accepted
    in_valid = 1;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (in_ready[0] || acc_cycle.size() != 0) begin failures++; $display("FAIL accepted without keys"); end
    in_valid = 0;
    keys_ready = 1;

    // lone block: latency
    out_ready = 1;
    send(rand128());
    n = 0;
    while (!out_valid[0] && n < 200) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != 32) begin failures++; $display("FAIL latency %0d cycles, expected 32", n); end
    @(posedge clk); #1;

    // stream: rate and overlap of the three stages
    acc_cycle.delete();
    for (int i = 0; i < 6; i++) send(rand128());
    for (int i = 1; i < acc_cycle.size(); i++) begin
      checks++;
      if (acc_cycle[i] - acc_cycle[i-1] != 11) begin
        failures++; $display("FAIL accept interval %0d, expected 11", acc_cycle[i] - acc_cycle[i-1]);
      end
    end
    wait (expq[0].size() == 0 && expq[1].size() == 0); @(posedge clk); #1;
    checks++;
    if (max_inflight < 3) begin failures++; $display("FAIL only %0d blocks in flight", max_inflight); end

    // random traffic with back-pressure and key changes between bursts
    fork
      begin
        for (int i = 0; i < 30; i++) begin
          if (i % 10 == 0) begin
            wait (expq[0].size() == 0 && expq[1].size() == 0); @(posedge clk);
            #1 set_keys(rand128(), rand128());
          end
          repeat ($urandom_range(0, 12)) @(posedge clk);
          #1 send(rand128());
        end
      end
      begin
        while (1) begin @(posedge clk); #1 out_ready = ($urandom_range(0, 3) != 0); end
      end
    join_any
    out_ready = 1;
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
