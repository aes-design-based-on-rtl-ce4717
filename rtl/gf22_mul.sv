// Multiplier in GF(2^2), the innermost gate-level block of the S-box.
//
// Operands are 2-bit field elements a = {a1,a0}, b = {b1,b0} over the field
// polynomial x^2 + x + 1. The product is formed from three AND gates (high
// bits, XOR-ed bits, low bits) and two XOR gates, following the gate drawing
// of the design:  p1 = (a1^a0)(b1^b0) ^ a0 b0,  p0 = a1 b1 ^ a0 b0.
// The field polynomial is this design's choice of the usual composite-field
// construction. Purely combinational.
module gf22_mul (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] p
);
  logic hh, mm, ll;

  always_comb begin
    hh = a[1] & b[1];
    mm = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    ll = a[0] & b[0];
    p  = {mm ^ ll, hh ^ ll};
  end
endmodule
