// Multiplicative inverse in GF(2^4) (the x^-1 block of the S-box inverter).
//
// Every non-zero element satisfies x^15 = 1, so x^-1 = x^14 = x^2 * x^4 * x^8;
// the powers are formed with five GF(2^4) multipliers. Zero maps to zero, as
// the S-box requires. This construction is this design's choice: the inverse
// is only named as a block. Purely combinational.
module gf24_inv (
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic [3:0] x2, x4, x8, x6;

  gf24_mul u_sq1 (.a(x),  .b(x),  .p(x2));
  gf24_mul u_sq2 (.a(x2), .b(x2), .p(x4));
  gf24_mul u_sq3 (.a(x4), .b(x4), .p(x8));
  gf24_mul u_m6  (.a(x2), .b(x4), .p(x6));
  gf24_mul u_m14 (.a(x6), .b(x8), .p(y));
endmodule
