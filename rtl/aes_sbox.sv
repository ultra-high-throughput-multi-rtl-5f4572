// aes_sbox: one AES S-Box, the byte substitution of SubBytes/SubWord.
//
// It is a plain 256-entry look-up table (the 16x16-byte table of the
// design) indexed by the input byte; the table itself lives in aes_pkg.
// Purely combinational: the output follows the input in the same cycle.
module aes_sbox
  import aes_pkg::*;
(
  input  aes_byte_t a,   // byte to substitute
  output aes_byte_t y    // S(a)
);
  assign y = SBOX[a];
endmodule
