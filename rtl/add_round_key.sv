// add_round_key: Round Key Addition, the bitwise XOR of the state with a
// 128-bit round key. Combinational.
module add_round_key
  import rijndael_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
