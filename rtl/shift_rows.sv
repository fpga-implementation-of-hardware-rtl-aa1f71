// shift_rows: AES ShiftRows as a gated byte multiplexer.
//
// Row r of the state is rotated left by r byte positions: output byte
// (row r, column c) takes input byte (row r, column (c+r) mod 4). The
// permutation is pure wiring; the multiplexer stage is gated by CS1, and
// when CS1 is 0 every output bit is forced to zero so that the register
// behind it captures zeros and stops toggling between rounds.
// Combinational. The multiplexer with CS1 and its zeroing follow the
// published architecture; byte order is FIPS-197 (byte 0 in bits 127:120).
module shift_rows
  import aes_pkg::*;
(
  input  logic   cs1,
  input  state_t din,
  output state_t dout
);

  state_t shifted;

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shifted[127 - 8*(4*c + r) -: 8] = state_byte(din, 4*((c + r) % 4) + r);
    dout = cs1 ? shifted : '0;
  end

endmodule
