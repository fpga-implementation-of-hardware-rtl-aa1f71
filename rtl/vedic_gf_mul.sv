// vedic_gf_mul: GF(2^8) product of a state byte and a 4-bit constant,
// built on the 4x4 Vedic multiplier.
//
// The byte is split into nibbles; each is multiplied by the constant with
// a carry-less vedic_mul4, the high product is shifted up four places and
// the two are XORed into a polynomial of degree <= 10, which is reduced
// modulo m(x) = x^8+x^4+x^3+x+1. MixColumns uses it with c = {02} and
// {03}. Combinational. Using the Vedic multiplier for the MixColumns
// products follows the published design; the nibble split and the
// reduction step are this design's.
module vedic_gf_mul
  import aes_pkg::*;
(
  input  byte_t       a,
  input  logic [3:0]  c,
  output byte_t       p
);

  logic [7:0] p_lo, p_hi;

  vedic_mul4 #(.CARRYLESS(1'b1)) u_lo (.a(a[3:0]), .b(c), .p(p_lo));
  vedic_mul4 #(.CARRYLESS(1'b1)) u_hi (.a(a[7:4]), .b(c), .p(p_hi));

  assign p = gf8_reduce({p_hi, 4'b0} ^ {4'b0, p_lo});

endmodule
