// aes_key_exp_round: one round of the AES-128 key expansion.
//
// The previous 128-bit round key is split into four words w_in0..w_in3
// (w_in0 in the top 32 bits). The last word is rotated left by one byte
// (RotWord), each of its bytes goes through an S-Box (SubWord) and the
// result is XORed with Rcon = {RC[ROUND], 8'h00, 8'h00, 8'h00}. That word
// is XORed into w_in0, and a chain of XORs gives the rest:
// w_out0 = w_in0 ^ t, w_out1 = w_out0 ^ w_in1, w_out2 = w_out1 ^ w_in2,
// w_out3 = w_out2 ^ w_in3. Combinational; ROUND (1..10) selects RC.
module aes_key_exp_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1   // index j of the round key produced
) (
  input  aes_block_t key_in,     // round key j-1
  output aes_block_t key_out     // round key j
);
  aes_word_t w_in [4];
  aes_word_t w_out[4];
  aes_word_t rot_word, sub_word, t_word;

  always_comb begin
    for (int i = 0; i < 4; i++) w_in[i] = key_in[127-32*i -: 32];
    rot_word = {w_in[3][23:0], w_in[3][31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.a(rot_word[31-8*b -: 8]), .y(sub_word[31-8*b -: 8]));
  end

  always_comb begin
    t_word   = sub_word ^ {RC[ROUND], 24'h000000};
    w_out[0] = w_in[0]  ^ t_word;
    w_out[1] = w_out[0] ^ w_in[1];
    w_out[2] = w_out[1] ^ w_in[2];
    w_out[3] = w_out[2] ^ w_in[3];
    key_out  = {w_out[0], w_out[1], w_out[2], w_out[3]};
  end
endmodule
