// sbox_cfa: sub-pipelined composite-field AES S-box.
//
// S(a) = affine(delta^-1(inv(delta(a)))): the byte is mapped by the linear
// isomorphism delta into GF((2^4)^2), inverted there with nibble arithmetic,
// mapped back by delta^-1 and passed through the AES affine transform
// (x -> A*x + {63}). Inverting ah*X + al uses
//     d   = lambda*ah^2 + ah*al + al^2          (cul)
//     inv = (ah*d^-1)*X + (ah+al)*d^-1           (gf4_inv, gf4_mul_lut)
// All nibble products are table look-ups.
//
// Pipeline (PIPELINED = 1): four registers, one after each step
//   stage 1  delta, split into nibbles, ah^al       -> s1
//   stage 2  CUL combine to d                        -> s2
//   stage 3  d^-1 from the inversion table          -> s3
//   stage 4  output products, delta^-1, affine      -> dout
// stage_en[k] enables the register of stage k+1 (CS4..CS7 in the
// encryptor); a byte presented on din reaches dout after four enabled
// edges. With PIPELINED = 0 the registers are left out and the S-box is
// combinational (the non-pipelined form).
//
// The four-stage sub-pipelined structure, the isomorphic maps, the nibble
// combiner and the table multiplications follow the published S-box. The
// field constants, the matrix of delta (the basis change sending the AES
// generator to the root {21} of x^8+x^4+x^3+x+1 in the composite field) and
// where the stage boundaries fall are this design's choices.
module sbox_cfa
  import aes_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic       clk,
  input  logic [3:0] stage_en,
  input  byte_t      din,
  output byte_t      dout
);

  // Rows of the linear maps: output bit j is the parity of (ROW[j] & input).
  localparam byte_t DELTA     [8] = '{8'h03, 8'hA8, 8'h5C, 8'h68, 8'h70, 8'hD2, 8'hAC, 8'hA0};
  localparam byte_t DELTA_INV [8] = '{8'hB1, 8'hB0, 8'h42, 8'h82, 8'h9A, 8'hD4, 8'h5E, 8'h54};

  function automatic byte_t lin_map(byte_t x, byte_t rows [8]);
    byte_t y;
    for (int j = 0; j < 8; j++) y[j] = ^(x & rows[j]);
    return y;
  endfunction

  function automatic byte_t affine(byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  typedef struct packed {
    nibble_t ah;
    nibble_t ahl;   // ah ^ al
    nibble_t al;
  } nib_t;

  typedef struct packed {
    nibble_t ah;
    nibble_t ahl;
    nibble_t d;
  } comb_t;

  // ---- stage 1: isomorphic mapping -------------------------------------
  byte_t mapped;
  nib_t  c1, s1;
  always_comb begin
    mapped = lin_map(din, DELTA);
    c1.ah  = mapped[7:4];
    c1.al  = mapped[3:0];
    c1.ahl = mapped[7:4] ^ mapped[3:0];
  end

  // ---- stage 2: combine upper and lower nibbles -----------------------
  nibble_t d2;
  comb_t   c2, s2;
  cul u_cul (.ah(s1.ah), .al(s1.al), .d(d2));
  always_comb c2 = '{ah: s1.ah, ahl: s1.ahl, d: d2};

  // ---- stage 3: GF(2^4) inversion -------------------------------------
  nibble_t d_inv;
  comb_t   c3, s3;
  gf4_inv u_inv (.a(s2.d), .y(d_inv));
  always_comb c3 = '{ah: s2.ah, ahl: s2.ahl, d: d_inv};

  // ---- stage 4: output multiplications, inverse map, affine -----------
  nibble_t inv_h, inv_l;
  byte_t   c4;
  gf4_mul_lut u_mul_h (.a(s3.ah),  .b(s3.d), .p(inv_h));
  gf4_mul_lut u_mul_l (.a(s3.ahl), .b(s3.d), .p(inv_l));
  always_comb c4 = affine(lin_map({inv_h, inv_l}, DELTA_INV));

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk) begin
      if (stage_en[0]) s1   <= c1;
      if (stage_en[1]) s2   <= c2;
      if (stage_en[2]) s3   <= c3;
      if (stage_en[3]) dout <= c4;
    end
  end else begin : g_comb
    always_comb begin
      s1   = c1;
      s2   = c2;
      s3   = c3;
      dout = c4;
    end
  end

endmodule
