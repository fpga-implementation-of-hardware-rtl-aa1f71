// vedic_mul2: 2x2-bit Vedic (Urdhva-Tiryakbhyam, "vertically and
// crosswise") multiplier.
//
// Vertical:  p0 = a0*b0.  Crosswise: a1*b0 + a0*b1, sum to p1, carry on.
// Vertical:  a1*b1 plus that carry gives p2 and p3. Two half adders.
// With CARRYLESS = 1 the crosswise sum is a plain XOR and no carry is
// passed on, so p is the product of a and b as polynomials over GF(2);
// the AES MixColumns uses that form. Combinational. The vertical-and-
// crosswise structure follows the published multiplier; the carry-less
// option is this design's addition.
module vedic_mul2 #(
  parameter bit CARRYLESS = 1'b0
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic t1, t2, t3, c1;

  always_comb begin
    t1   = a[1] & b[0];
    t2   = a[0] & b[1];
    t3   = a[1] & b[1];
    c1   = CARRYLESS ? 1'b0 : (t1 & t2);
    p[0] = a[0] & b[0];
    p[1] = t1 ^ t2;
    p[2] = t3 ^ c1;
    p[3] = t3 & c1;
  end

endmodule
