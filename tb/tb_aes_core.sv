// Test of the AES core (shared key expansion, encryption, then decryption of
// the cipher text). Checked: the AES standard's worked example, 20 random
// blocks and keys against the reference model, cipher_text valid when
// enc_done pulses 41 cycles after start, done 83 cycles after start with
// plain_text_out equal to the input, and a start while busy being ignored.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0, busy, enc_done, done;
  block_t plain_text, key, cipher_text, plain_text_out;
  int checks = 0, failures = 0, ignored_starts = 0;

  aes_core dut (.clk, .rst_n, .start, .plain_text, .key, .busy, .enc_done, .done,
                .cipher_text, .plain_text_out);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input block_t p, input block_t k, input block_t c_exp, input bit poke);
    int n, n_enc;
    @(negedge clk);
    plain_text = p;
    key = k;
    start = 1;
    @(negedge clk);
    start = 0;
    plain_text = rand_blk();
    key = rand_blk();
    n = 1;
    n_enc = 0;
    while (!done && n < 300) begin
      if (enc_done) begin
        n_enc = n;
        expect_eq("cipher text", cipher_text, c_exp);
      end
      start = poke && (n == 50);
      if (start) ignored_starts++;
      @(negedge clk);
      n++;
    end
    start = 0;
    expect_eq("encryption latency", 128'(n_enc), 128'(41));
    expect_eq("total latency", 128'(n), 128'(83));
    expect_eq("recovered plain text", plain_text_out, p);
    expect_eq("cipher text held", cipher_text, c_exp);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t p, k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int t = 0; t < 20; t++) begin
      p = rand_blk();
      k = rand_blk();
      run(p, k, encrypt(p, k), t % 4 == 0);
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
