// snow3g_pkg: types, constants and elaboration-time functions shared by the
// SNOW 3G datapath.
//
// The S-box byte tables (SR, the Rijndael S-box, and SQ, the Dickson-polynomial
// S-box) and the alpha/alpha^-1 multipliers are not stored as typed-in
// numbers: they are computed from their algebraic definitions by the
// functions below, once, at elaboration. The definitions are those of the
// SNOW 3G specification:
//   MULx(V,c)      = V<<1 ^ (c if V[7])
//   MULxPOW(V,i,c) = MULx applied i times
//   SR(x)          = affine(x^-1) in GF(2^8) mod x^8+x^4+x^3+x+1, constant 0x63
//                    (the Rijndael S-box)
//   SQ(x)          = x+x^9+x^13+x^15+x^33+x^41+x^45+x^47+x^49 in GF(2^8)
//                    mod x^8+x^6+x^5+x^3+1, plus 0x25
//   MULalpha(c)    = MULxPOW(c,23)||MULxPOW(c,245)||MULxPOW(c,48)||MULxPOW(c,239)
//   DIValpha(c)    = MULxPOW(c,16)||MULxPOW(c,39)||MULxPOW(c,6)||MULxPOW(c,64)
//                    (both with c = 0xA9)
// Nothing here is clocked; the package only supplies constants.
package snow3g_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  typedef logic [31:0] word_t;
  typedef logic [7:0]  byte_t;
  typedef byte_t       byte_table_t [256];
  typedef word_t       word_table_t [256];
  typedef word_t       basis_t [8];

  localparam int unsigned LFSR_STAGES = 16;  // S0..S15
  localparam int unsigned INIT_CLOCKS = 32;  // initialisation clocks

  localparam byte_t POLY_S1    = 8'h1B;  // MixColumn reduction for S1
  localparam byte_t POLY_S2    = 8'h69;  // MixColumn reduction for S2
  localparam byte_t POLY_ALPHA = 8'hA9;  // reduction for MULalpha/DIValpha

  function automatic byte_t mulx(byte_t v, byte_t c);
    return v[7] ? ((v << 1) ^ c) : (v << 1);
  endfunction

  function automatic byte_t mulxpow(byte_t v, int unsigned i, byte_t c);
    byte_t r = v;
    for (int unsigned k = 0; k < i; k++) r = mulx(r, c);
    return r;
  endfunction

  // Powers of a generator of GF(2^8)*: exp[i] = g^i, i = 0..254.
  // For S1's field (poly 0x1B) g = x+1 (multiply: MULx(v)^v); for S2's field
  // (poly 0x69) g = x (multiply: MULx(v)). Working through powers of g keeps
  // the elaboration-time work small: g^i inverts to g^(255-i) and raises to
  // the power e as g^(i*e mod 255).
  function automatic byte_table_t gen_exp(bit is_s2);
    byte_table_t e;
    byte_t v = 8'h01;
    for (int i = 0; i < 256; i++) begin
      e[i] = v;
      v = is_s2 ? mulx(v, POLY_S2) : (mulx(v, POLY_S1) ^ v);
    end
    return e;
  endfunction

  // Byte S-box SR (is_s2=0) or SQ (is_s2=1), indexed by input byte.
  function automatic byte_table_t gen_sbox(bit is_s2);
    byte_table_t e = gen_exp(is_s2);
    byte_table_t s;
    int unsigned exps [9] = '{1, 9, 13, 15, 33, 41, 45, 47, 49};
    byte_t i, r;
    s[0] = is_s2 ? 8'h25 : 8'h63;  // SR(0) = affine(0), SQ(0) = 0x25
    for (int k = 0; k < 255; k++) begin
      if (is_s2) begin
        r = 8'h25;
        for (int j = 0; j < 9; j++) r ^= e[(k * exps[j]) % 255];
      end else begin
        i = e[(255 - k) % 255];  // multiplicative inverse of g^k
        r = i ^ {i[6:0], i[7]} ^ {i[5:0], i[7:6]} ^ {i[4:0], i[7:5]}
              ^ {i[3:0], i[7:4]} ^ 8'h63;
      end
      s[e[k]] = r;
    end
    return s;
  endfunction

  // T-table j of an S-box: the contribution of input byte j (j=0 is bits
  // 31:24) to the 32-bit output, from byte S-box sb and MixColumn
  // reduction c. The coefficients are those of the SNOW 3G S1/S2 definition.
  function automatic word_table_t gen_ttable(byte_table_t sb, byte_t c, int j);
    word_table_t t;
    byte_t s, s2, s3;
    for (int x = 0; x < 256; x++) begin
      s  = sb[x];
      s2 = mulx(s, c);
      s3 = s2 ^ s;
      case (j)
        0:       t[x] = {s2, s3, s,  s };
        1:       t[x] = {s,  s2, s3, s };
        2:       t[x] = {s,  s,  s2, s3};
        default: t[x] = {s3, s,  s,  s2};
      endcase
    end
    return t;
  endfunction

  // Images of the eight unit bytes under MULalpha (div=0) or DIValpha (div=1).
  // Both maps are GF(2)-linear, so any byte maps to the XOR of these.
  function automatic basis_t gen_alpha_basis(bit div);
    basis_t b;
    byte_t u;
    for (int k = 0; k < 8; k++) begin
      u = byte_t'(1 << k);
      if (div)
        b[k] = {mulxpow(u, 16, POLY_ALPHA), mulxpow(u, 39, POLY_ALPHA),
                mulxpow(u, 6, POLY_ALPHA),  mulxpow(u, 64, POLY_ALPHA)};
      else
        b[k] = {mulxpow(u, 23, POLY_ALPHA), mulxpow(u, 245, POLY_ALPHA),
                mulxpow(u, 48, POLY_ALPHA), mulxpow(u, 239, POLY_ALPHA)};
    end
    return b;
  endfunction

endpackage
