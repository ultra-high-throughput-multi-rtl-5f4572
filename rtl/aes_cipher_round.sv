// aes_cipher_round: one AES encryption round, fully parallel over 128 bits.
//
// The state goes through SubMatrix (16 S-Boxes), ShiftMatrix (wiring),
// MixMatrix (four MixColumn blocks) and AddRoundKey, in that order, in one
// combinational path; the pipeline registers between rounds belong to the
// core. The last AES round has no MixColumns: HAS_MIX = 0 builds that
// round (SubMatrix, ShiftMatrix, AddRoundKey), as the core's tenth round.
module aes_cipher_round
  import aes_pkg::*;
#(
  parameter bit HAS_MIX = 1'b1   // 0 for the final round of the cipher
) (
  input  aes_block_t state_in,
  input  aes_block_t round_key,
  output aes_block_t state_out
);
  aes_block_t sub_out, shift_out, mix_out;

  aes_sub_matrix   u_sub   (.state_in(state_in),  .state_out(sub_out));
  aes_shift_matrix u_shift (.state_in(sub_out),   .state_out(shift_out));

  if (HAS_MIX) begin : g_mix
    aes_mix_matrix u_mix (.state_in(shift_out), .state_out(mix_out));
  end else begin : g_no_mix
    assign mix_out = shift_out;
  end

  aes_add_round_key u_ark (.state_in(mix_out), .round_key(round_key), .state_out(state_out));
endmodule
