// Test of inv_sub_bytes: inverse S-box on every byte.
// One worked example of the AES standard's first encryption round, then
// 200 random states against the reference model of the testbench package.
module tb_inv_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] d, q;
  int checks = 0, failures = 0;

  inv_sub_bytes dut (.d, .q);

  task automatic check(input logic [127:0] in, input logic [127:0] exp);
    d = in;
    #1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %h -> %h, expected %h", in, q, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    check(128'hd42711aee0bf98f1b8b45de51e415230, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 200; i++) begin
      v = rand_blk();
      check(v, sub_bytes(v, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
