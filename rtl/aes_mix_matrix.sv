// aes_mix_matrix: MixMatrix, MixColumns applied to the whole state.
//
// Four aes_mix_column blocks work side by side, one per 32-bit column of
// the 4x4 byte matrix (column c is bytes 4c..4c+3, bits [127-32c -: 32]).
// Combinational.
module aes_mix_matrix
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_mix_column (
      .col_in  (state_in [127-32*c -: 32]),
      .col_out (state_out[127-32*c -: 32])
    );
  end
endmodule
