// aes_add_round_key: AddRoundKey, the state XOR the round key.
//
// Each of the 16 state bytes is XORed with the byte of the round key at the
// same position (r0..r15), 16 byte-wide XORs in parallel. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  input  aes_block_t round_key,
  output aes_block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign state_out[127-8*i -: 8] = state_in[127-8*i -: 8] ^ round_key[127-8*i -: 8];
  end
endmodule
