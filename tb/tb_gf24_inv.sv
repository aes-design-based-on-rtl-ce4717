// Exhaustive test of the GF(2^4) inverter: for every non-zero x the product
// x * y, formed by a schoolbook GF((2^2)^2) multiply, must be 1; zero must
// map to zero.
module tb_gf24_inv;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  gf24_inv dut (.x, .y);

  function automatic logic [1:0] m2(input logic [1:0] u, input logic [1:0] v);
    logic [2:0] t;
    t = (v[0] ? {1'b0, u} : 3'b0) ^ (v[1] ? {u, 1'b0} : 3'b0);
    if (t[2]) t ^= 3'b111;
    return t[1:0];
  endfunction

  function automatic logic [3:0] m4(input logic [3:0] u, input logic [3:0] v);
    logic [1:0] hh;
    hh = m2(u[3:2], v[3:2]);
    return {hh ^ m2(u[3:2], v[1:0]) ^ m2(u[1:0], v[3:2]),
            m2(hh, 2'b10) ^ m2(u[1:0], v[1:0])};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if ((i == 0 && y !== 4'h0) || (i != 0 && m4(x, y) !== 4'h1)) begin
        failures++;
        $display("FAIL inv(%h) = %h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
