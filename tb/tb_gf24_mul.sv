// Exhaustive test of the GF(2^4) multiplier: all 256 operand pairs against
// the schoolbook product in GF((2^2)^2), y^2 = y + phi with phi = {10}:
//   hi = ah bh ^ ah bl ^ al bh,  lo = phi ah bh ^ al bl,
// where the GF(2^2) products are formed by shift-and-add.
module tb_gf24_mul;
  logic [3:0] a, b, p;
  int checks = 0, failures = 0;

  gf24_mul dut (.a, .b, .p);

  function automatic logic [1:0] m2(input logic [1:0] x, input logic [1:0] y);
    logic [2:0] t;
    t = (y[0] ? {1'b0, x} : 3'b0) ^ (y[1] ? {x, 1'b0} : 3'b0);
    if (t[2]) t ^= 3'b111;
    return t[1:0];
  endfunction

  function automatic logic [3:0] ref_mul(input logic [3:0] x, input logic [3:0] y);
    logic [1:0] hh;
    hh = m2(x[3:2], y[3:2]);
    return {hh ^ m2(x[3:2], y[1:0]) ^ m2(x[1:0], y[3:2]),
            m2(hh, 2'b10) ^ m2(x[1:0], y[1:0])};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== ref_mul(a, b)) begin
          failures++;
          $display("FAIL %h*%h = %h, expected %h", a, b, p, ref_mul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
