// inv_add_round_key: AddRoundKey step of AES decryption, combinational.
//
// The state and the round key are XORed bit by bit; byte order does not
// matter here, so the row-major layout of aes_pkg passes straight through.
//
// From the document: a plain XOR of state and round key. There is nothing
// else to choose.
module inv_add_round_key
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  always_comb state_out = state_in ^ round_key;

endmodule
