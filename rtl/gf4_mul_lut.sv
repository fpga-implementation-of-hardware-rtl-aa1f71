// gf4_mul_lut: GF(2^4) multiplier as a precomputed look-up table.
//
// The composite-field S-box does its nibble multiplications by table look-up
// instead of by gates: the 4-bit operands form an 8-bit address into a
// 256 x 4-bit constant table holding a*b in GF(2^4) = GF(2)[x]/(x^4+x+1).
// The table is filled at elaboration from aes_pkg::gf4_mul_f, so it is a
// ROM after synthesis (one 8-input function per output bit). Purely
// combinational. Using a table for this product follows the published
// S-box; the field polynomial is this design's choice.
module gf4_mul_lut
  import aes_pkg::*;
(
  input  nibble_t a,
  input  nibble_t b,
  output nibble_t p
);

  typedef nibble_t lut_t [256];

  function automatic lut_t build_lut();
    lut_t t;
    for (int i = 0; i < 256; i++) t[i] = gf4_mul_f(nibble_t'(i >> 4), nibble_t'(i));
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  assign p = LUT[{a, b}];

endmodule
