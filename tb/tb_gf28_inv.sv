// Exhaustive test of the composite-field GF(2^8) inverter: for all 256
// inputs the result must be the inverse in the AES field (checked by a
// shift-and-add multiply), with 0 mapping to 0.
module tb_gf28_inv;
  import aes_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  gf28_inv dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if ((i == 0 && y !== 8'h00) || (i != 0 && gmul(x, y) !== 8'h01)) begin
        failures++;
        $display("FAIL inv(%h) = %h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
