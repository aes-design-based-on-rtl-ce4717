// Multiplier in GF(2^4) built as GF((2^2)^2), field polynomial x^2 + x + phi
// with phi = {10}.
//
// The 4-bit operands are split into 2-bit halves. Three GF(2^2) multipliers
// form ah*bh, (ah^al)*(bh^bl) and al*bl; the first is scaled by phi and the
// partial products are combined with XORs:
//   p_hi = (ah^al)(bh^bl) ^ al bl,   p_lo = phi ah bh ^ al bl.
// The structure follows the design's multiplier drawing; the value of phi is
// this design's choice. Purely combinational.
module gf24_mul (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  logic [1:0] hh, mm, ll, hh_phi;

  gf22_mul u_hh (.a(a[3:2]),        .b(b[3:2]),        .p(hh));
  gf22_mul u_mm (.a(a[3:2] ^ a[1:0]), .b(b[3:2] ^ b[1:0]), .p(mm));
  gf22_mul u_ll (.a(a[1:0]),        .b(b[1:0]),        .p(ll));

  // Multiplication by phi = {10} in GF(2^2): {t1,t0} * x = {t1^t0, t1}.
  always_comb begin
    hh_phi = {hh[1] ^ hh[0], hh[1]};
    p      = {mm ^ ll, hh_phi ^ ll};
  end
endmodule
