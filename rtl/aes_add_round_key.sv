// aes_add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with
// the 128-bit round key (word w[round*4+c] onto column c). The operation is
// the same for encryption and decryption. Combinational.
//
// Interface: state, round_key in; dout out.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t round_key,
  output block_t dout
);

  assign dout = state ^ round_key;

endmodule
