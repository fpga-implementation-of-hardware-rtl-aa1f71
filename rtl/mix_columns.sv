// mix_columns: MixColumns over the state, with the final-round bypass.
//
// Four mix_column units work on the four 32-bit columns. CS2 gates their
// operands: when it is 0 they see zeros and their outputs stay at zero.
// CS3 drives the final-round multiplexer: when it is 1 the input state is
// passed through unchanged, since the last AES round has no MixColumns.
//   dout = cs3 ? din : (cs2 ? MixColumns(din) : 0)
// Combinational. CS2 controlling MixColumns and CS3 the final-round
// multiplexer follow the published architecture; reading CS2 as operand
// isolation is this design's interpretation.
module mix_columns
  import aes_pkg::*;
(
  input  logic   cs2,
  input  logic   cs3,
  input  state_t din,
  output state_t dout
);

  state_t operand, mixed;

  assign operand = cs2 ? din : '0;

  for (genvar c = 0; c < 4; c++) begin : g_col
    mix_column u_col (.col_in(operand[127 - 32*c -: 32]), .col_out(mixed[127 - 32*c -: 32]));
  end

  assign dout = cs3 ? din : mixed;

endmodule
