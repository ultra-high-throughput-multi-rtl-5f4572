// aes_core: one AES-128 encryption core with outer-round pipelining.
//
// The core is the fully unrolled cipher: the initial AddRoundKey (round key
// 0), nine full rounds (round keys 1..9) and the final round without
// MixColumns (round key 10). A register bank follows each of these eleven
// steps and nothing else is registered, so each pipeline stage holds one
// round. The core accepts a new 128-bit block every clock cycle and returns
// its ciphertext eleven clock cycles later: a block presented with in_valid
// before edge k appears on data_out with out_valid after edge k+10 (the
// eleven-cycle latency of the design). The round keys come from outside
// (the shared key expansion) and must be stable while blocks are in flight.
//
// The valid bits running beside the data are this design's own addition;
// only they are reset (synchronous, active low), the data registers are not.
module aes_core
  import aes_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  aes_block_t      data_in,      // plaintext
  input  aes_round_keys_t round_keys,   // round keys 0..10
  output logic            out_valid,
  output aes_block_t      data_out      // ciphertext
);
  aes_block_t      stage_q [0:NR];      // register after round j
  aes_block_t      stage_d [0:NR];
  logic [NR:0]     valid_q;

  // Round 0: AddRoundKey with the cipher key.
  aes_add_round_key u_round0 (
    .state_in (data_in), .round_key(round_keys[0]), .state_out(stage_d[0]));

  // Rounds 1..10; the last one has no MixMatrix.
  for (genvar j = 1; j <= NR; j++) begin : g_round
    aes_cipher_round #(.HAS_MIX(j != NR)) u_round (
      .state_in (stage_q[j-1]),
      .round_key(round_keys[j]),
      .state_out(stage_d[j]));
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j <= NR; j++) stage_q[j] <= stage_d[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[NR-1:0], in_valid};
  end

  assign data_out  = stage_q[NR];
  assign out_valid = valid_q[NR];
endmodule
