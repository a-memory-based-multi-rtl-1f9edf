// fec_pkg: types, code parameters and Galois-field helpers shared by the
// multi-standard ITU-T J.83 FEC decoder.
//
// The decoder serves the four annexes of J.83. Annexes A and C share one
// FEC chain (RS(204,188) over GF(2^8), (12,17) interleaving, 15-bit PRBS),
// annex B uses an extended RS(128,122) over GF(2^7) with a trellis code,
// annex D (ATSC-like) uses RS(207,187) over GF(2^8) and a 16-bit PRBS.
// The field polynomials, generator roots and code lengths below follow the
// standard as summarised in the design description; the numeric encodings of
// the mode enum are this design's own choice.
//
// The constant functions build power and inverse tables at elaboration
// time, so no table file is needed.
package fec_pkg;

  typedef enum logic [1:0] {
    J83_A = 2'd0,
    J83_B = 2'd1,
    J83_C = 2'd2,
    J83_D = 2'd3
  } fec_mode_e;

  // Primitive polynomials: p(x) = x^8+x^4+x^3+x^2+1 and p(x) = x^7+x^3+1.
  localparam logic [8:0] PPOLY8 = 9'h11D;
  localparam logic [7:0] PPOLY7 = 8'h89;

  // Largest correction capability (annex D) and syndrome count.
  localparam int unsigned TMAX   = 10;
  localparam int unsigned NSYN   = 2 * TMAX;
  // Largest message length K (annexes A/C) used to size the RS buffer.
  localparam int unsigned KMAX   = 188;

  // Per-mode code parameters.
  function automatic int unsigned rs_n(fec_mode_e m);
    case (m)
      J83_B:   return 128;
      J83_D:   return 207;
      default: return 204;
    endcase
  endfunction

  function automatic int unsigned rs_k(fec_mode_e m);
    case (m)
      J83_B:   return 122;
      J83_D:   return 187;
      default: return 188;
    endcase
  endfunction

  function automatic int unsigned rs_t(fec_mode_e m);
    case (m)
      J83_B:   return 3;
      J83_D:   return 10;
      default: return 8;
    endcase
  endfunction

  // Multiply in GF(2^8) (gf7 = 0) or GF(2^7) (gf7 = 1). Operands of GF(2^7)
  // live in bits [6:0]; bit 7 must be zero. The polynomial product is formed
  // once and reduced by the selected primitive polynomial (Fig. 3.6 idea).
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b, logic gf7);
    logic [14:0] p;
    logic [14:0] r8, r7;
    p = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) p ^= 15'(a) << i;
    r8 = p;
    for (int i = 14; i >= 8; i--)
      if (r8[i]) r8 ^= 15'(PPOLY8) << (i - 8);
    r7 = p;
    for (int i = 14; i >= 7; i--)
      if (r7[i]) r7 ^= 15'(PPOLY7) << (i - 7);
    return gf7 ? {1'b0, r7[6:0]} : r8[7:0];
  endfunction

  // Multiply by alpha (x) in the selected field: one shift and a conditional
  // reduction, cheap enough for long table walks at elaboration.
  function automatic logic [7:0] gf_xtime(logic [7:0] v, logic gf7);
    if (gf7) return v[6] ? ({v[6:0], 1'b0} ^ PPOLY7) & 8'h7F : {v[6:0], 1'b0} & 8'h7F;
    return v[7] ? ({v[6:0], 1'b0} ^ PPOLY8[7:0]) : {v[6:0], 1'b0};
  endfunction

  // Tables of alpha^i and alpha^-i, i = 0..NSYN-1, for constant multipliers.
  function automatic logic [NSYN-1:0][7:0] gen_pow_table(logic gf7, logic neg);
    logic [NSYN-1:0][7:0] t;
    logic [7:0] a, v;
    a = neg ? (gf7 ? 8'h44 : 8'h8E) : 8'h02;   // alpha^-1 = alpha^126 / alpha^254
    v = 8'd1;
    for (int i = 0; i < NSYN; i++) begin
      t[i] = v;
      v = gf_mul(v, a, gf7);
    end
    return t;
  endfunction

  // Inverse table of GF(2^8) (entry 0 is 0): walking v = alpha^i, the
  // inverse of alpha^i is alpha^(255-i).
  function automatic logic [255:0][7:0] gen_inv8();
    logic [255:0][7:0] t;
    logic [254:0][7:0] ex;
    t = '0;
    ex[0] = 8'd1;
    for (int i = 1; i < 255; i++) ex[i] = gf_xtime(ex[i-1], 1'b0);
    for (int i = 0; i < 255; i++) t[ex[i]] = ex[(255 - i) % 255];
    return t;
  endfunction

  // Inverse table of GF(2^7) (entry 0 is 0), same construction with order 127.
  function automatic logic [127:0][6:0] gen_inv7();
    logic [127:0][6:0] t;
    logic [126:0][7:0] ex;
    t = '0;
    ex[0] = 8'd1;
    for (int i = 1; i < 127; i++) ex[i] = gf_xtime(ex[i-1], 1'b1);
    for (int i = 0; i < 127; i++) t[ex[i][6:0]] = ex[(127 - i) % 127][6:0];
    return t;
  endfunction

endpackage
