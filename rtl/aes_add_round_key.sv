// aes_add_round_key: the AddRoundKey transformation, a bitwise XOR of the
// 128-bit state with the 128-bit round key. Purely combinational.
// Interface: state_i, round_key_i -> state_o.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  output block_t state_o
);

  assign state_o = state_i ^ round_key_i;

endmodule
