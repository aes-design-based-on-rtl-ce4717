// Exhaustive test of the GF(2^2) multiplier: all 16 operand pairs against a
// shift-and-add product reduced modulo x^2 + x + 1.
module tb_gf22_mul;
  logic [1:0] a, b, p;
  int checks = 0, failures = 0;

  gf22_mul dut (.a, .b, .p);

  function automatic logic [1:0] ref_mul(input logic [1:0] x, input logic [1:0] y);
    logic [2:0] t;
    t = (y[0] ? {1'b0, x} : 3'b0) ^ (y[1] ? {x, 1'b0} : 3'b0);
    if (t[2]) t ^= 3'b111;
    return t[1:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (p !== ref_mul(a, b)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, expected %0d", a, b, p, ref_mul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
