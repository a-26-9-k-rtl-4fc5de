// composite_inv: combinational GF(2^16) inverter built in the composite field
// GF((2^8)^2), the inversion unit of the Bjorck-Pereyra error magnitude
// solver.
//
// The input is moved into the composite representation b*X + c (TRANSFORM),
// then inverted with
//   1/(b*X + c) = (b^2*PSI + b*c + c^2)^-1 * (b*X + b + c),   X^2 = X + PSI,
// which needs two squarers, a constant multiplier by PSI, one GF(2^8)
// inversion and two GF(2^8) multipliers, and finally moved back
// (DETRANSFORM). This is the structure the decoder's paper gives; the GF(2^8)
// polynomial, PSI and the basis change matrices are this implementation's
// choice (see bch_pkg). The GF(2^8) inversion is a^254 as a chain of squarers
// and multipliers. An input of 0 gives 0. Purely combinational: the solver
// puts its pipeline register at the output.
module composite_inv
  import bch_pkg::*;
(
  input  gf16_t a,
  output gf16_t y
);

  gf16_t ac, yc;
  gf8_t  b, c, d, dinv;

  always_comb begin
    ac   = gf2_matvec(COMP_T, a);
    b    = ac[15:8];
    c    = ac[7:0];
    d    = gf8_mul(gf8_mul(b, b), COMP_PSI) ^ gf8_mul(b, c) ^ gf8_mul(c, c);
    dinv = gf8_inv(d);
    yc   = {gf8_mul(dinv, b), gf8_mul(dinv, b ^ c)};
    y    = gf2_matvec(COMP_TI, yc);
  end

endmodule
