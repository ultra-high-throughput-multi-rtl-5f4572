// aes_sub_matrix: SubMatrix, the SubBytes step applied to a whole block.
//
// The 128-bit state is cut into its 16 bytes and each byte goes through an
// S-Box of its own, so all 16 substitutions happen in parallel in one
// combinational level, as the design prescribes. Byte i of the output is
// S(byte i of the input); no byte moves.
module aes_sub_matrix
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (
      .a (state_in [127-8*i -: 8]),
      .y (state_out[127-8*i -: 8])
    );
  end
endmodule
