// Exhaustive test of the computed inverse S-box: all 256 inputs against the
// reference model (field inverse found by search, affine map as a matrix),
// plus two entries of the published AES table.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.x, .y);

  task automatic check(input logic [7:0] in, input logic [7:0] exp);
    x = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %h -> %h, expected %h", in, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'h63, 8'h00);
    check(8'hed, 8'h53);
    for (int i = 0; i < 256; i++) check(8'(i), inv_sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
