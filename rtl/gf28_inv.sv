// Multiplicative inverse in GF(2^8) (AES field, x^8+x^4+x^3+x+1) computed in
// the composite field GF((2^4)^2) instead of with a lookup table.
//
// Data path, in the order of the design's inverter drawing:
//   1. delta maps the byte into GF((2^4)^2) and splits it into halves ah, al;
//   2. d = lambda * ah^2  ^  (ah ^ al) * al           (lambda = {1100});
//   3. d^-1 in GF(2^4);
//   4. the two output halves are ah * d^-1 and (ah ^ al) * d^-1;
//   5. delta^-1 maps the result back to the AES field.
// The block structure follows the design; the delta matrix, lambda and the
// GF(2^4) polynomial are this design's choice of the common composite-field
// construction (checked against the field inverse for all 256 inputs).
// Zero maps to zero. Purely combinational.
module gf28_inv (
  input  logic [7:0] x,
  output logic [7:0] y
);
  localparam logic [3:0] LAMBDA = 4'b1100;

  logic [7:0] q;            // x in the composite field
  logic [3:0] ah, al, ah2, ah2_lam, mid, d, d_inv, oh, ol;
  logic [7:0] r;            // result in the composite field

  // Isomorphic map delta.
  always_comb begin
    q[7] = x[7] ^ x[5];
    q[6] = x[7] ^ x[6] ^ x[4] ^ x[3] ^ x[2] ^ x[1];
    q[5] = x[7] ^ x[5] ^ x[3] ^ x[2];
    q[4] = x[7] ^ x[5] ^ x[3] ^ x[2] ^ x[1];
    q[3] = x[7] ^ x[6] ^ x[2] ^ x[1];
    q[2] = x[7] ^ x[4] ^ x[3] ^ x[2] ^ x[1];
    q[1] = x[6] ^ x[4] ^ x[1];
    q[0] = x[6] ^ x[1] ^ x[0];
    ah   = q[7:4];
    al   = q[3:0];
  end

  gf24_mul u_sq  (.a(ah),      .b(ah),     .p(ah2));
  gf24_mul u_lam (.a(ah2),     .b(LAMBDA), .p(ah2_lam));
  gf24_mul u_mid (.a(ah ^ al), .b(al),     .p(mid));

  assign d = ah2_lam ^ mid;

  gf24_inv u_inv (.x(d), .y(d_inv));

  gf24_mul u_oh (.a(ah),      .b(d_inv), .p(oh));
  gf24_mul u_ol (.a(ah ^ al), .b(d_inv), .p(ol));

  // Inverse map delta^-1.
  always_comb begin
    r    = {oh, ol};
    y[7] = r[7] ^ r[6] ^ r[5] ^ r[1];
    y[6] = r[6] ^ r[2];
    y[5] = r[6] ^ r[5] ^ r[1];
    y[4] = r[6] ^ r[5] ^ r[4] ^ r[2] ^ r[1];
    y[3] = r[5] ^ r[4] ^ r[3] ^ r[2] ^ r[1];
    y[2] = r[7] ^ r[4] ^ r[3] ^ r[2] ^ r[1];
    y[1] = r[5] ^ r[4];
    y[0] = r[6] ^ r[5] ^ r[4] ^ r[2] ^ r[0];
  end
endmodule
