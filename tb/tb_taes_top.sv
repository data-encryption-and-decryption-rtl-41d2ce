// tb_taes_top: end-to-end test of the Triple AES top level at its default
// parameters (key order K2, K2, K1).
//
// Keys are loaded through key_load; plaintext blocks go into the
// encryption chain, every ciphertext that comes out is compared with the
// reference model and fed back into the decryption chain, whose output
// must be the original plaintext. Both chains run at the same time. The
// run includes the all-zero keys and block, the case shown in the
// design's simulation results: with K1 = K2 = 0 the zero block becomes
// 66e94bd4... after the first AES pass, f795bd4a... after the second and
// a10cf66d0fddf3405370b4bf8df5bfb3 after the third. Each mechanism of the design is counted and
// a failure is counted for one that never happened:
//   key expansion with keys_ready 10 cycles after key_load, input refused
//   before keys_ready, three blocks in flight in each chain, back-pressure
//   on the ciphertext and the plaintext outputs, encryption and decryption
//   busy in the same cycle, and a key reload between bursts.
module tb_taes_top;
  import aes_ref_pkg::*;
  localparam logic [2:0] SEL = 3'b011;   // the top's default key order
  logic clk = 0, rst_n = 0;
  logic key_load = 0, keys_ready;
  logic [127:0] key1 = '0, key2 = '0, k1, k2;
  logic pt_valid = 0, pt_ready, ct_valid, ct_ready = 0;
  logic dct_valid = 0, dct_ready, dpt_valid, dpt_ready = 0;
  logic [127:0] pt_data = '0, ct_data, dct_data = '0, dpt_data;
  logic [127:0] ct_exp [$], pt_exp [$], loop_q [$];
  int checks = 0, failures = 0;
  int n_keyload = 0, n_refused = 0, n_ct_stall = 0, n_dpt_stall = 0, n_both = 0;
  int enc_inflight = 0, dec_inflight = 0, max_enc = 0, max_dec = 0;
  logic done_enc = 0;

  taes_top dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key1(key1), .key2(key2),
    .keys_ready(keys_ready),
    .pt_valid(pt_valid), .pt_ready(pt_ready), .pt_data(pt_data),
    .ct_valid(ct_valid), .ct_ready(ct_ready), .ct_data(ct_data),
    .dct_valid(dct_valid), .dct_ready(dct_ready), .dct_data(dct_data),
    .dpt_valid(dpt_valid), .dpt_ready(dpt_ready), .dpt_data(dpt_data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard and mechanism counters.
  always @(posedge clk) begin
    if (pt_valid && !pt_ready && !keys_ready) n_refused++;
    if (pt_valid && pt_ready) enc_inflight++;
    if (dct_valid && dct_ready) dec_inflight++;
    if (ct_valid && !ct_ready) n_ct_stall++;
    if (dpt_valid && !dpt_ready) n_dpt_stall++;
    if (enc_inflight > 0 && dec_inflight > 0) n_both++;
    if (ct_valid && ct_ready) begin
      logic [127:0] e;
      enc_inflight--;
      checks++;
      e = ct_exp.pop_front();
      if (ct_data !== e) begin failures++; $display("FAIL ciphertext %h exp %h", ct_data, e); end
      loop_q.push_back(ct_data);
    end
    if (dpt_valid && dpt_ready) begin
      logic [127:0] e;
      dec_inflight--;
      checks++;
      e = pt_exp.pop_front();
      if (dpt_data !== e) begin failures++; $display("FAIL plaintext %h exp %h", dpt_data, e); end
    end
    if (enc_inflight > max_enc) max_enc = enc_inflight;
    if (dec_inflight > max_dec) max_dec = dec_inflight;
  end

  // Feeds every ciphertext back into the decryption chain.
  initial begin
    @(posedge rst_n);
    forever begin
      logic fire;
      @(posedge clk);
      fire = dct_valid && dct_ready;               // handshake at this edge
      #1;
      if (fire) dct_valid = 0;
      if (!dct_valid && loop_q.size() > 0 && $urandom_range(0, 3) != 0) begin
        dct_data = loop_q.pop_front();
        dct_valid = 1;
      end
    end
  end

  task automatic load_keys(logic [127:0] a, logic [127:0] b);
    int n = 0;
    key1 = a; key2 = b; k1 = a; k2 = b;
    key_load = 1;
    @(posedge clk); #1 key_load = 0;
    n_keyload++;
    while (!keys_ready && n < 100) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != 10) begin failures++; $display("FAIL keys_ready after %0d cycles, expected 10", n); end
  endtask

  task automatic send(logic [127:0] d);
    pt_data = d; pt_valid = 1;
    ct_exp.push_back(taes_enc(k1, k2, SEL, d));
    pt_exp.push_back(d);
    do @(posedge clk); while (!pt_ready);
    #1 pt_valid = 0;
  endtask

  task automatic drain();
    while (ct_exp.size() != 0 || pt_exp.size() != 0 || loop_q.size() != 0 || dct_valid) @(posedge clk);
    #1;
  endtask

  initial begin
    build_tables();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // blocks offered before any key: must be refused
    pt_valid = 1;
    repeat (4) @(posedge clk);
    #1 pt_valid = 0;

    // all-zero keys and plaintext
    load_keys('0, '0);
    fork
      begin
        ct_ready = 1; dpt_ready = 1;
        send('0);
        wait (ct_valid);
        #1 checks++;
        if (ct_data !== 128'ha10cf66d0fddf3405370b4bf8df5bfb3) begin
          failures++; $display("FAIL all-zero vector: %h", ct_data);
        end
        drain();
        for (int burst = 0; burst < 3; burst++) begin
          if (burst > 0) load_keys(rand128(), rand128());
          for (int i = 0; i < 8; i++) begin
            if (burst == 2) repeat ($urandom_range(0, 6)) @(posedge clk);
            #1 send(rand128());
          end
          drain();
        end
        done_enc = 1;
      end
      begin
        // back-pressure on both outputs, except during the first burst
        while (!done_enc) begin
          @(posedge clk); #1;
          if (n_keyload >= 2) begin
            ct_ready  = ($urandom_range(0, 3) != 0);
            dpt_ready = ($urandom_range(0, 3) != 0);
          end
        end
      end
    join
    ct_ready = 1; dpt_ready = 1;

    checks++; if (n_refused == 0)   begin failures++; $display("FAIL no input refused before keys"); end
    checks++; if (max_enc < 3)      begin failures++; $display("FAIL encryption chain held %0d blocks at most", max_enc); end
    checks++; if (max_dec < 3)      begin failures++; $display("FAIL decryption chain held %0d blocks at most", max_dec); end
    checks++; if (n_ct_stall == 0)  begin failures++; $display("FAIL no ciphertext back-pressure"); end
    checks++; if (n_dpt_stall == 0) begin failures++; $display("FAIL no plaintext back-pressure"); end
    checks++; if (n_both == 0)      begin failures++; $display("FAIL chains never busy together"); end
    checks++; if (n_keyload < 2)    begin failures++; $display("FAIL no key reload"); end
    $display("mechanisms: key loads %0d, refused %0d, max in flight enc %0d dec %0d, ct stalls %0d, pt stalls %0d, both busy %0d",
             n_keyload, n_refused, max_enc, max_dec, n_ct_stall, n_dpt_stall, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
