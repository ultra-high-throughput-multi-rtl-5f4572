// aes_multicore: N AES-128 cores in parallel behind one shared key expansion.
//
// One key expansion turns the 128-bit key into the eleven round keys and
// broadcasts them to N_CORES identical, outer-round pipelined AES cores.
// Every clock cycle each core can take its own 128-bit plaintext block, so
// the whole array encrypts N_CORES x 128 bits per cycle (ECB: all cores use
// the same key), and each result leaves eleven cycles after its block
// entered. Sharing the key expansion instead of giving every core its own
// is the point of the design: it saves the area and power of N_CORES-1 key
// schedules. N_CORES = 10 is the largest configuration the design reports
// (about 1 Tbit/s at 800 MHz); any N_CORES >= 1 works.
//
// Interface: key_in must be held while data streams; key_ready (from the
// key expansion) is high once all round keys belong to key_in. Lane i has
// its own in_valid[i] / data_in[i] and out_valid[i] / data_out[i]; a lane
// valid is a simple per-cycle strobe with no back-pressure. Entering a
// block while key_ready is low is a usage error and is flagged by an
// assertion. Per-lane valid strobes and key_ready are this design's own
// interface choices. Reset is synchronous and active low.
module aes_multicore
  import aes_pkg::*;
#(
  parameter int unsigned N_CORES = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  aes_block_t                  key_in,
  output logic                        key_ready,
  input  logic       [N_CORES-1:0]    in_valid,
  input  aes_block_t [N_CORES-1:0]    data_in,
  output logic       [N_CORES-1:0]    out_valid,
  output aes_block_t [N_CORES-1:0]    data_out
);
  aes_round_keys_t round_keys;

  aes_key_expansion u_key_expansion (
    .clk        (clk),
    .rst_n      (rst_n),
    .key_in     (key_in),
    .round_keys (round_keys),
    .key_ready  (key_ready)
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    aes_core u_core (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid[i]),
      .data_in    (data_in[i]),
      .round_keys (round_keys),
      .out_valid  (out_valid[i]),
      .data_out   (data_out[i])
    );
  end

  // A block may only enter once every round key belongs to the current key.
  a_key_ready_on_input : assert property (
    @(posedge clk) disable iff (!rst_n) (|in_valid) |-> key_ready)
    else $error("aes_multicore: block entered while key_ready is low");
endmodule
