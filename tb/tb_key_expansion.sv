// Test of the key expansion: the AES standard's example key (round keys 1
// and 10 are checked against the published values) and 20 random keys, all
// eleven round keys against the reference model. key_valid[i] must rise i+1
// cycles after the start cycle and ready 11 cycles after it.
module tb_key_expansion;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ready;
  block_t key;
  block_t round_keys [NR+1];
  logic [NR:0] key_valid;
  int checks = 0, failures = 0;

  key_expansion dut (.clk, .rst_n, .start, .key, .round_keys, .key_valid, .ready);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input block_t k);
    keys_t ref_keys;
    int n;
    ref_keys = expand_key(k);
    @(negedge clk);
    key = k;
    start = 1;
    @(negedge clk);
    start = 0;
    key = rand_blk();        // the key is only needed in the start cycle
    n = 1;
    for (int i = 0; i <= NR; i++) begin
      while (!key_valid[i] && n < 40) begin
        @(negedge clk);
        n++;
      end
      expect_eq($sformatf("key_valid[%0d] cycle", i), 128'(n), 128'(i + 1));
    end
    expect_eq("ready cycle", 128'(ready), 128'(1));
    for (int i = 0; i <= NR; i++)
      expect_eq($sformatf("round key %0d", i), round_keys[i], ref_keys[i]);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    expect_eq("published round key 1", round_keys[1], 128'ha0fafe1788542cb123a339392a6c7605);
    expect_eq("published round key 10", round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int t = 0; t < 20; t++) run(rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
