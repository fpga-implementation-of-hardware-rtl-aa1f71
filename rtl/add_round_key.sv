// add_round_key: AddRoundKey, the bitwise XOR of the state with the round
// key. Combinational; follows the AES definition.
module add_round_key
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
