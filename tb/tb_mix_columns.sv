// Test of mix_columns: column polynomial product with {03}x^3+{01}x^2+{01}x+{02}.
// One worked example of the AES standard's first encryption round, then
// 200 random states against the reference model of the testbench package.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] d, q;
  int checks = 0, failures = 0;

  mix_columns dut (.d, .q);

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
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    for (int i = 0; i < 200; i++) begin
      v = rand_blk();
      check(v, mix_columns(v, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
