// aes_pkg: types, constants and field helpers shared by the AES-128 encryptor.
//
// The state is a 128-bit vector in FIPS-197 byte order: byte 0 (row 0,
// column 0) sits in bits 127:120, byte 4*c+r is row r of column c.
// The control bundle ctrl_t carries the eleven control signals CS1..CS11
// that the sequencer drives into the datapath. Which datapath action each of
// CS4..CS11 controls is this design's own assignment; CS1 (ShiftRows
// enable), CS2 (MixColumns) and CS3 (final-round multiplexer) follow the
// published architecture.
//
// Field conventions: GF(2^8) uses m(x) = x^8+x^4+x^3+x+1 as in AES. The
// composite field GF((2^4)^2) used inside the S-box is built on
// GF(2^4) = GF(2)[x]/(x^4+x+1) with the extension X^2 = X + lambda,
// lambda = {1100}; these constants are this design's choice.
package aes_pkg;

  localparam int unsigned NR           = 10;  // rounds of AES-128
  localparam int unsigned ROUND_CYCLES = 6;   // pipeline registers in the round loop

  localparam logic [3:0] GF4_LAMBDA = 4'hC;   // X^2 = X + lambda in GF((2^4)^2)

  typedef logic [127:0] state_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nibble_t;

  // CS1..CS11, one bit each.
  typedef struct packed {
    logic cs1;   // ShiftRows enable; 0 forces its multiplexers to zero
    logic cs2;   // MixColumns enable; 0 forces its products to zero
    logic cs3;   // final round: bypass MixColumns
    logic cs4;   // S-box stage 1 register enable
    logic cs5;   // S-box stage 2 register enable
    logic cs6;   // S-box stage 3 register enable
    logic cs7;   // S-box stage 4 register enable
    logic cs8;   // round-key register update
    logic cs9;   // state register load from the round loop
    logic cs10;  // state register load with plaintext xor key, key register load
    logic cs11;  // ciphertext register load
  } ctrl_t;

  // Carry-less product of two nibbles reduced by x^4+x+1 (shift-and-add).
  // Used only to fill the constant look-up tables at elaboration.
  function automatic nibble_t gf4_mul_f(nibble_t a, nibble_t b);
    nibble_t acc = '0;
    nibble_t x   = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) acc ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'b0011 : 4'b0000);
    end
    return acc;
  endfunction

  // Reduction of a polynomial of degree <= 11 modulo m(x) = x^8+x^4+x^3+x+1.
  function automatic byte_t gf8_reduce(logic [11:0] p);
    logic [11:0] r = p;
    for (int i = 11; i >= 8; i--)
      if (r[i]) r ^= 12'h11B << (i - 8);
    return r[7:0];
  endfunction

  // Byte b of the state (b = 4*column + row).
  function automatic byte_t state_byte(state_t s, int unsigned b);
    return s[127 - 8*b -: 8];
  endfunction

endpackage
