// gf4_inv: multiplicative inverse in GF(2^4) = GF(2)[x]/(x^4+x+1).
//
// A 16-entry constant table, filled at elaboration by searching for the
// element whose product with the address is 1; zero maps to zero, as the
// AES S-box requires. Combinational. The document gives the inversion only
// as a function; the table form is this design's choice, in line with its
// look-up-table multipliers.
module gf4_inv
  import aes_pkg::*;
(
  input  nibble_t a,
  output nibble_t y
);

  typedef nibble_t inv_t [16];

  function automatic inv_t build_inv();
    inv_t t;
    for (int i = 0; i < 16; i++) begin
      t[i] = '0;
      for (int j = 1; j < 16; j++)
        if (gf4_mul_f(nibble_t'(i), nibble_t'(j)) == 4'h1) t[i] = nibble_t'(j);
    end
    return t;
  endfunction

  localparam inv_t INV = build_inv();

  assign y = INV[a];

endmodule
