// Test of shift_rows: row r rotated left by r bytes (the example is the 4x4 matrix pair of the ShiftRows illustration).
// One worked example of the AES standard's first encryption round, then
// 200 random states against the reference model of the testbench package.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] d, q;
  int checks = 0, failures = 0;

  shift_rows dut (.d, .q);

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
    check(128'hd42711aee0bf98f1b8b45de51e415230, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 200; i++) begin
      v = rand_blk();
      check(v, shift_rows(v, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
