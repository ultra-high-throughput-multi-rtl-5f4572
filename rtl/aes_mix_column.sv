// aes_mix_column: MixColumns on one 32-bit column of the state.
//
// The column (in_0 .. in_3, in_0 = row 0) is multiplied in GF(2^8) by the
// circulant matrix [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02].
// Following the design, each input byte gets its own doubler: the byte is
// shifted left by one and, when its top bit was 1, XORed with 8'h1b (a 2:1
// multiplexer selects between the two). Three times the byte is the double
// XOR the byte itself. Every output byte is then a 4-input XOR of one
// doubled, one tripled and two plain input bytes. Combinational.
module aes_mix_column
  import aes_pkg::*;
(
  input  aes_word_t col_in,   // {in_0, in_1, in_2, in_3}
  output aes_word_t col_out   // {out_0, out_1, out_2, out_3}
);
  aes_byte_t in_b [4];
  aes_byte_t x2   [4];
  aes_byte_t x3   [4];
  aes_byte_t out_b[4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      in_b[i] = col_in[31-8*i -: 8];
      // {02} x byte: shift, and reduce by m(x) when bit 7 falls out
      x2[i]   = in_b[i][7] ? ({in_b[i][6:0], 1'b0} ^ 8'h1b)
                           :  {in_b[i][6:0], 1'b0};
      // {03} x byte = {02} x byte XOR byte
      x3[i]   = x2[i] ^ in_b[i];
    end
    out_b[0] = x2[0]   ^ x3[1]   ^ in_b[2] ^ in_b[3];
    out_b[1] = in_b[0] ^ x2[1]   ^ x3[2]   ^ in_b[3];
    out_b[2] = in_b[0] ^ in_b[1] ^ x2[2]   ^ x3[3];
    out_b[3] = x3[0]   ^ in_b[1] ^ in_b[2] ^ x2[3];
    col_out  = {out_b[0], out_b[1], out_b[2], out_b[3]};
  end
endmodule
