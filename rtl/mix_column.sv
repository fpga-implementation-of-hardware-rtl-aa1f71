// mix_column: AES MixColumns of one column.
//
// With s0..s3 the column's bytes (row 0 in bits 31:24),
//   s'r = {02}*s(r) ^ {03}*s(r+1) ^ s(r+2) ^ s(r+3)   (indices mod 4),
// the circulant matrix [02 03 01 01]. The eight constant products come
// from vedic_gf_mul units; the rest is XOR. Combinational. The matrix is
// the AES one; computing the products with Vedic multipliers follows the
// published design.
module mix_column
  import aes_pkg::*;
(
  input  logic [31:0] col_in,
  output logic [31:0] col_out
);

  byte_t s   [4];
  byte_t x2  [4];
  byte_t x3  [4];

  for (genvar r = 0; r < 4; r++) begin : g_row
    assign s[r] = col_in[31 - 8*r -: 8];
    vedic_gf_mul u_x2 (.a(s[r]), .c(4'h2), .p(x2[r]));
    vedic_gf_mul u_x3 (.a(s[r]), .c(4'h3), .p(x3[r]));
    assign col_out[31 - 8*r -: 8] = x2[r] ^ x3[(r+1)%4] ^ s[(r+2)%4] ^ s[(r+3)%4];
  end

endmodule
