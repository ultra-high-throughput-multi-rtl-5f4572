// aes_key_expansion: the one AES-128 key expansion shared by all cores.
//
// Round keys are produced by a pipeline of ten key-expansion rounds: the
// input key is registered, round j (j = 1..10) expands the registered round
// key j-1, and its result is registered again to give round key j. Round key
// 0 is the input key itself, taken before the first register, so it feeds
// the cores' initial AddRoundKey directly. All ten round keys are driven
// onto a bus that every core reads in parallel.
//
// Timing: after key_in changes, round key j is correct j+1 clock edges
// later, and all of them after 11 edges. key_ready says so: it rises once
// key_in has stayed unchanged for the 11 edges the pipeline needs, and it
// falls in the same cycle as key_in changes. The key is meant to stay fixed
// while data streams through; a block in flight when the key changes is
// encrypted with a mix of old and new round keys. key_ready and its counter
// are this design's own addition; the pipeline follows the design.
//
// Reset (active low, synchronous) clears only the readiness counter; the
// key registers need none.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  aes_block_t      key_in,
  output aes_round_keys_t round_keys,   // round_keys[j] = round key j
  output logic            key_ready
);
  aes_block_t key_reg;             // register ahead of key-expansion round 1
  aes_block_t rk_reg  [1:NR];      // register after key-expansion round j
  aes_block_t rk_next [1:NR];
  logic [3:0] stable_cnt;          // edges since key_in last differed from key_reg

  for (genvar j = 1; j <= NR; j++) begin : g_round
    if (j == 1) begin : g_first
      aes_key_exp_round #(.ROUND(j)) u_kexp (.key_in(key_reg), .key_out(rk_next[j]));
    end else begin : g_next
      aes_key_exp_round #(.ROUND(j)) u_kexp (.key_in(rk_reg[j-1]), .key_out(rk_next[j]));
    end
  end

  always_ff @(posedge clk) begin
    key_reg <= key_in;
    for (int j = 1; j <= NR; j++) rk_reg[j] <= rk_next[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                   stable_cnt <= '0;
    else if (key_in != key_reg)   stable_cnt <= '0;
    else if (stable_cnt != 4'(NR)) stable_cnt <= stable_cnt + 4'd1;
  end

  assign key_ready = (stable_cnt == 4'(NR)) && (key_in == key_reg);

  always_comb begin
    round_keys[0] = key_in;
    for (int j = 1; j <= NR; j++) round_keys[j] = rk_reg[j];
  end
endmodule
