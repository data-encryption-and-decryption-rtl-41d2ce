// tb_key_expansion: expands the FIPS-197 example key and random keys and
// compares all eleven round keys with the reference schedule; checks that
// ready rises exactly 10 clock edges after the edge that samples load and
// that a new load drops ready.
module tb_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;
  logic clk = 0, rst_n = 0, load = 0, ready;
  logic [127:0] key;
  round_keys_t rk;
  int checks = 0, failures = 0;

  key_expansion dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .ready(ready), .rk(rk));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k);
    logic [127:0] exp [11];
    int n = 0;
    key = k; load = 1;
    @(posedge clk);
    #1 load = 0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready still high after load"); end
    while (!ready && n < 50) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != 10) begin failures++; $display("FAIL ready after %0d cycles, expected 10", n); end
    expand(k, exp);
    for (int i = 0; i <= 10; i++) begin
      checks++;
      if (rk[i] !== exp[i]) begin
        failures++; $display("FAIL key %h rk[%0d]=%h exp %h", k, i, rk[i], exp[i]);
      end
    end
    key = rand128();      // the key input may change once expansion is done
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!ready || rk[10] !== exp[10]) begin failures++; $display("FAIL round keys not held"); end
  endtask

  initial begin
    build_tables();
    key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (ready) begin failures++; $display("FAIL ready after reset"); end
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL standard last round key %h", rk[10]);
    end
    for (int n = 0; n < 20; n++) run(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
