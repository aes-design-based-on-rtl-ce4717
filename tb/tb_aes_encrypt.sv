// Test of the iterative encryption datapath. The testbench plays the key store:
// it answers round_idx with the round key from the reference key schedule.
// Checked: the two worked examples of the AES standard, 30 random
// blocks/keys against the reference model, done exactly 41 cycles after the
// start cycle, and a start issued while busy being ignored.
module tb_aes_encrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0, busy, done;
  block_t din, dout, round_key;
  round_t round_idx;
  keys_t  keys;
  int checks = 0, failures = 0, ignored_starts = 0;

  aes_encrypt dut (.clk, .rst_n, .start, .plain_text(din), .round_key, .round_idx, .busy, .done, .cipher_text(dout));

  always #5 clk = ~clk;
  assign round_key = (round_idx <= 10) ? keys[round_idx] : '0;

  task automatic expect_eq(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input block_t blk, input block_t k, input block_t exp, input bit poke);
    int n;
    keys = expand_key(k);
    @(negedge clk);
    din = blk;
    start = 1;
    @(negedge clk);
    start = 0;
    din = rand_blk();
    n = 1;
    while (!done && n < 200) begin
      if (poke && n == 10) begin
        start = 1;              // must be ignored: the datapath is busy
        ignored_starts++;
      end else start = 0;
      @(negedge clk);
      n++;
    end
    start = 0;
    expect_eq("latency", 128'(n), 128'(41));
    expect_eq("result", dout, exp);
    @(negedge clk);
    expect_eq("idle after done", 128'(busy), 128'(0));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t b, k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, 0);
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    for (int t = 0; t < 30; t++) begin
      b = rand_blk();
      k = rand_blk();
      run(b, k, encrypt(b, k), t % 5 == 0);
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
