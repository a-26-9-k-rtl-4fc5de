// bch_pkg: types, constants and Galois-field arithmetic shared by the soft
// BCH decoder.
//
// The decoder works in GF(2^16), the field of the DVB-S2 normal-frame BCH
// codes. Elements are 16-bit vectors in the polynomial basis of
// p(x) = x^16 + x^5 + x^3 + x^2 + 1 (the DVB-S2 field polynomial g1(x));
// alpha, the primitive element, is the vector 16'h0002. Addition is XOR.
//
// The inversion unit works in the composite field GF((2^8)^2): an element is
// b*X + c with b, c in GF(2^8) (polynomial x^8 + x^4 + x^3 + x^2 + 1) and
// X^2 = X + PSI. PSI = 8'h20 is the smallest element of GF(2^8) with trace 1,
// which makes X^2 + X + PSI irreducible. The basis change between the two
// representations is a 16x16 GF(2) matrix: column j of COMP_T is theta^j in
// the composite field, where theta is a root of p(x) there, so that
// alpha^j maps to theta^j; COMP_TI holds the columns of the inverse matrix.
// Only the field polynomial of GF(2^16) comes from DVB-S2; the GF(2^8)
// polynomial, PSI and theta are free choices of this implementation.
package bch_pkg;

  localparam int GF_M = 16;
  typedef logic [GF_M-1:0] gf16_t;
  typedef logic [7:0]      gf8_t;

  // Low 16 bits of the field polynomial x^16 + x^5 + x^3 + x^2 + 1.
  localparam gf16_t GF16_POLY = 16'h002D;
  // Low 8 bits of the subfield polynomial x^8 + x^4 + x^3 + x^2 + 1.
  localparam gf8_t  GF8_POLY  = 8'h1D;
  localparam gf8_t  COMP_PSI  = 8'h20;
  // Order of the multiplicative group of GF(2^16).
  localparam int unsigned GF_ORDER = 65535;

  localparam gf16_t COMP_T [GF_M] = '{
    16'h0001, 16'h0334, 16'h05d9, 16'h9d8d, 16'h1198, 16'hd5eb, 16'h5f6d, 16'h8167,
    16'h1ce9, 16'h082d, 16'hd2b0, 16'h3757, 16'h8585, 16'hfb4c, 16'h12d6, 16'h5ecf};
  localparam gf16_t COMP_TI [GF_M] = '{
    16'h0001, 16'h0189, 16'h406c, 16'h17b6, 16'hc40a, 16'hf87a, 16'h6a5d, 16'h4379,
    16'h3aca, 16'h46d4, 16'hc057, 16'hada1, 16'haa1f, 16'hf1e5, 16'h7e4b, 16'he989};

  // General GF(2^16) multiplier: shift-and-add with reduction by p(x).
  function automatic gf16_t gf_mul(gf16_t a, gf16_t b);
    gf16_t r = '0;
    for (int i = GF_M - 1; i >= 0; i--) begin
      r = {r[GF_M-2:0], 1'b0} ^ (r[GF_M-1] ? GF16_POLY : '0);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // alpha^e, for elaboration-time constants (square and multiply).
  function automatic gf16_t gf_alpha_pow(int unsigned e);
    gf16_t base = 16'h0002;
    gf16_t r    = 16'h0001;
    int unsigned x = e % GF_ORDER;
    while (x != 0) begin
      if (x[0]) r = gf_mul(r, base);
      base = gf_mul(base, base);
      x = x >> 1;
    end
    return r;
  endfunction

  // GF(2^8) multiplier.
  function automatic gf8_t gf8_mul(gf8_t a, gf8_t b);
    gf8_t r = '0;
    for (int i = 7; i >= 0; i--) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? GF8_POLY : '0);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // GF(2^8) inverse as a^254 = a^(2+4+...+128); maps 0 to 0.
  function automatic gf8_t gf8_inv(gf8_t a);
    gf8_t sq = a;
    gf8_t r  = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq = gf8_mul(sq, sq);
      r  = gf8_mul(r, sq);
    end
    return r;
  endfunction

  // Multiply a 16-bit vector by a GF(2) matrix given as its columns.
  function automatic gf16_t gf2_matvec(gf16_t cols [GF_M], gf16_t v);
    gf16_t r = '0;
    for (int j = 0; j < GF_M; j++)
      if (v[j]) r ^= cols[j];
    return r;
  endfunction

endpackage
