// Test of add_round_key: the AES standard's first-round AddRoundKey example,
// then 200 random state/key pairs against a bitwise XOR.
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] d, k, q;
  int checks = 0, failures = 0;

  add_round_key dut (.d, .round_key(k), .q);

  task automatic check(input logic [127:0] in, input logic [127:0] key, input logic [127:0] exp);
    d = in;
    k = key;
    #1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %h ^ %h -> %h, expected %h", in, key, q, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v, w;
    check(128'h046681e5e0cb199a48f8d37a2806264c, 128'ha0fafe1788542cb123a339392a6c7605,
          128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 200; i++) begin
      v = rand_blk();
      w = rand_blk();
      check(v, w, v ^ w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
