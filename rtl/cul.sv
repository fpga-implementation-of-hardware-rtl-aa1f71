// cul: combine-upper-and-lower-nibble unit of the composite-field S-box.
//
// A byte mapped into GF((2^4)^2) is ah*X + al with X^2 = X + lambda. Its
// inverse needs the GF(2^4) value d = lambda*ah^2 + ah*al + al^2, which
// merges the two nibbles into one; after inverting d the S-box forms
// ah*d^-1 and (ah+al)*d^-1. This unit computes d. ah*al comes from the
// table multiplier; lambda*ah^2 and al^2 are linear over GF(2) and are
// written as XOR networks derived from the field. Combinational.
// The role of the unit (merge the nibbles) follows the document; reading it
// as this norm is this design's interpretation.
module cul
  import aes_pkg::*;
(
  input  nibble_t ah,
  input  nibble_t al,
  output nibble_t d
);

  nibble_t prod_hl;
  nibble_t sq_lam_h;
  nibble_t sq_l;

  gf4_mul_lut u_mul (.a(ah), .b(al), .p(prod_hl));

  // Squaring in GF(2^4) mod x^4+x+1: (a3 a2 a1 a0)^2 = (a3, a3^a1, a2, a2^a0).
  always_comb begin
    sq_l     = {al[3], al[3] ^ al[1], al[2], al[2] ^ al[0]};
    sq_lam_h = gf4_mul_f({ah[3], ah[3] ^ ah[1], ah[2], ah[2] ^ ah[0]}, GF4_LAMBDA);
    d        = sq_lam_h ^ prod_hl ^ sq_l;
  end

endmodule
