// aes_shift_matrix: ShiftMatrix, the ShiftRows step, realised as wiring.
//
// Row r of the 4x4 byte matrix is rotated left by r bytes: row 0 stays,
// row 1 moves one byte, row 2 two and row 3 three. With byte i at matrix
// entry (row i mod 4, column i div 4), output entry (r, c) is input entry
// (r, (c + r) mod 4). There is no logic, only a permutation of wires.
module aes_shift_matrix
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned DST = r + 4*c;
      localparam int unsigned SRC = r + 4*((c + r) % 4);
      assign state_out[127-8*DST -: 8] = state_in[127-8*SRC -: 8];
    end
  end
endmodule
