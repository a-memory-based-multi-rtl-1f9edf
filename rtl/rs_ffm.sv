// rs_ffm: multi-mode finite field multiplier, GF(2^8) or GF(2^7).
//
// A finite-field product splits into a carry-less polynomial multiplication,
// which is the same for every field, and a reduction modulo the primitive
// polynomial, which is not. This unit therefore forms the 15-bit polynomial
// product of A and B once, reduces it in parallel by
// p8(x) = x^8+x^4+x^3+x^2+1 and by p7(x) = x^7+x^3+1, and a multiplexer
// steered by the field select picks the result, as in the multi-mode
// multiplier of the design description. Purely combinational.
//
// Interface: a, b are field elements (GF(2^7) elements in bits [6:0] with
// bit 7 zero); gf7 = 1 selects GF(2^7); c = a*b.
module rs_ffm
  import fec_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       gf7,
  output logic [7:0] c
);

  logic [14:0] prod;
  logic [14:0] red8, red7;

  // Carry-less multiplier.
  always_comb begin
    prod = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) prod ^= 15'(a) << i;
  end

  // Reduction modulo p8(x).
  always_comb begin
    red8 = prod;
    for (int i = 14; i >= 8; i--)
      if (red8[i]) red8 ^= 15'(PPOLY8) << (i - 8);
  end

  // Reduction modulo p7(x).
  always_comb begin
    red7 = prod;
    for (int i = 14; i >= 7; i--)
      if (red7[i]) red7 ^= 15'(PPOLY7) << (i - 7);
  end

  assign c = gf7 ? {1'b0, red7[6:0]} : red8[7:0];

endmodule
