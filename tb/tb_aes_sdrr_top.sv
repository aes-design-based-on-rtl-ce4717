// End-to-end test of AES-128 with the SDRR input register, at the default
// (and only) size. Each operation presents sel, plain_text_in, rng and key
// with a one-cycle start; the testbench checks cipher_text against the
// reference encryption of the selected block (input data for sel = 0,
// random data for sel = 1), plain_text_out against the selected block, and
// the cycle counts (enc_done 43 and done 85 cycles after start).
// The first operation is the AES standard's worked example with sel = 0.
// Counted mechanisms, each of which must occur: input data selected, random
// data selected, a start ignored while busy, and an input change during an
// operation that must not disturb it.
module tb_aes_sdrr_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0, sel = 0, busy, enc_done, done;
  block_t plain_text_in, rng, key, cipher_text, plain_text_out;
  int checks = 0, failures = 0;
  int n_input_sel = 0, n_random_sel = 0, n_ignored = 0, n_input_change = 0;

  aes_sdrr_top dut (.clk, .rst_n, .sel, .plain_text_in, .rng, .key, .start,
                    .busy, .enc_done, .done, .cipher_text, .plain_text_out);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input bit s, input block_t p, input block_t r, input block_t k,
                     input bit poke);
    block_t chosen, c_exp;
    int n, n_enc;
    chosen = s ? r : p;
    c_exp  = encrypt(chosen, k);
    @(negedge clk);
    sel = s;
    plain_text_in = p;
    rng = r;
    key = k;
    start = 1;
    if (s) n_random_sel++; else n_input_sel++;
    @(negedge clk);
    start = 0;
    n = 1;
    n_enc = 0;
    while (!done && n < 400) begin
      if (n >= 3) begin
        // inputs may change once the SDRR has passed the block on
        sel = 1'($urandom);
        plain_text_in = rand_blk();
        rng = rand_blk();
        key = rand_blk();
        if (n == 3) n_input_change++;
      end
      if (enc_done) begin
        n_enc = n;
        expect_eq("cipher text", cipher_text, c_exp);
      end
      start = poke && (n == 60);
      if (start) n_ignored++;
      @(negedge clk);
      n++;
    end
    start = 0;
    expect_eq("encryption latency", 128'(n_enc), 128'(43));
    expect_eq("total latency", 128'(n), 128'(85));
    expect_eq("plain text out", plain_text_out, chosen);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 128'h3243f6a8885a308d313198a2e0370734, rand_blk(),
        128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    expect_eq("standard example", cipher_text, 128'h3925841d02dc09fbdc118597196a0b32);
    run(1, rand_blk(), 128'h3243f6a8885a308d313198a2e0370734,
        128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    for (int t = 0; t < 30; t++)
      run(1'($urandom), rand_blk(), rand_blk(), rand_blk(), t % 3 == 0);
    $display("input data %0d, random data %0d, ignored starts %0d, input changes %0d",
             n_input_sel, n_random_sel, n_ignored, n_input_change);
    checks += 4;
    if (n_input_sel == 0)    failures++;
    if (n_random_sel == 0)   failures++;
    if (n_ignored == 0)      failures++;
    if (n_input_change == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
