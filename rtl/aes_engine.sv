// aes_engine: the multi-core AES-128 engine with ECB and GCM counter modes.
//
// At its heart is aes_multicore: one shared key expansion feeding outer-
// round pipelined AES cores. With N_CORES data lanes the engine encrypts
// N_CORES x 128 bits per clock cycle; each lane's result leaves eleven
// cycles after its block entered.
//
// Two modes, chosen per block by mode (aes_mode_t):
//  * MODE_ECB: lane i's plaintext goes straight into its core and the
//    ciphertext comes out (the shared-key array on its own).
//  * MODE_CTR: the confidentiality part of AES-GCM. The cores encrypt
//    counter blocks from aes_ctr_counters and lane i's data is XORed with
//    that keystream; encryption and decryption are the same operation. An
//    extra core (core 0) encrypts J0 once per message and presents the
//    result on tag_mask; the GHASH authentication block that would combine
//    it with the ciphertext into a tag is not part of this RTL.
// With CTR_EN = 0 the counter logic and the extra core are left out and
// the engine is exactly the N_CORES-core shared-key array.
//
// Interface and timing (all synchronous to clk, reset active low):
//  * key_in is held while data flows; key_ready is high once all round keys
//    belong to it (11 cycles after a change).
//  * msg_start (with iv) begins a counter-mode message; data lanes may be
//    used from the next cycle. tag_mask_valid pulses 12 cycles after
//    msg_start.
//  * in_valid[i] / data_in[i]: one block per lane per cycle, no
//    back-pressure. In counter mode lanes must be filled from lane 0 up
//    (in_valid = 0..01..1), so that a message uses consecutive counters;
//    only its last cycle may be partly filled. The counters move on by
//    N_CORES on every counter-mode cycle with any lane valid.
//  * out_valid[i] / data_out[i] follow 11 cycles after the input.
// The data of a counter-mode block waits in an 11-stage delay line for its
// keystream. Mode handling, the delay line, msg_start and tag_mask are
// this design's choices; the counter chain and the extra J0 core follow
// the design's GCM figure.
module aes_engine
  import aes_pkg::*;
#(
  parameter int unsigned N_CORES = 10,
  parameter bit          CTR_EN  = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  aes_block_t                  key_in,
  output logic                        key_ready,
  input  aes_mode_t                   mode,
  input  logic                        msg_start,
  input  logic [95:0]                 iv,
  input  logic       [N_CORES-1:0]    in_valid,
  input  aes_block_t [N_CORES-1:0]    data_in,
  output logic       [N_CORES-1:0]    out_valid,
  output aes_block_t [N_CORES-1:0]    data_out,
  output logic                        tag_mask_valid,
  output aes_block_t                  tag_mask
);
  localparam int unsigned LAT = NR + 1;   // core latency in cycles

  if (CTR_EN) begin : g_ctr
    localparam int unsigned NC = N_CORES + 1;   // core 0 encrypts J0

    logic       [NC-1:0] core_in_valid, core_out_valid;
    aes_block_t [NC-1:0] core_in, core_out;
    aes_block_t              j0;
    aes_block_t [N_CORES-1:0] ctr;
    logic                    j0_pending;
    logic                    ctr_cycle;
    // Delay line: data and mode of each lane, waiting for the keystream.
    aes_block_t [N_CORES-1:0] data_dly [LAT];
    logic                     ctr_dly  [LAT];

    assign ctr_cycle = (mode == MODE_CTR) && (|in_valid);

    aes_ctr_counters #(.N_LANES(N_CORES)) u_counters (
      .clk(clk), .rst_n(rst_n), .load(msg_start), .iv(iv),
      .advance(ctr_cycle), .j0(j0), .ctr(ctr));

    always_ff @(posedge clk) begin
      if (!rst_n) j0_pending <= 1'b0;
      else        j0_pending <= msg_start;
    end

    always_comb begin
      core_in_valid[0] = j0_pending;
      core_in[0]       = j0;
      for (int i = 0; i < N_CORES; i++) begin
        core_in_valid[i+1] = in_valid[i];
        core_in[i+1]       = (mode == MODE_CTR) ? ctr[i] : data_in[i];
      end
    end

    aes_multicore #(.N_CORES(NC)) u_array (
      .clk(clk), .rst_n(rst_n), .key_in(key_in), .key_ready(key_ready),
      .in_valid(core_in_valid), .data_in(core_in),
      .out_valid(core_out_valid), .data_out(core_out));

    always_ff @(posedge clk) begin
      data_dly[0] <= data_in;
      ctr_dly[0]  <= (mode == MODE_CTR);
      for (int s = 1; s < LAT; s++) begin
        data_dly[s] <= data_dly[s-1];
        ctr_dly[s]  <= ctr_dly[s-1];
      end
    end

    always_comb begin
      for (int i = 0; i < N_CORES; i++) begin
        out_valid[i] = core_out_valid[i+1];
        data_out[i]  = ctr_dly[LAT-1] ? (core_out[i+1] ^ data_dly[LAT-1][i])
                                      : core_out[i+1];
      end
    end

    assign tag_mask_valid = core_out_valid[0];
    assign tag_mask       = core_out[0];

    // Counter mode fills lanes from lane 0 upward.
    a_ctr_lanes_contiguous : assert property (
      @(posedge clk) disable iff (!rst_n)
      (mode == MODE_CTR) |-> ((in_valid & (in_valid + 1'b1)) == '0))
      else $error("aes_engine: counter-mode lanes not filled from lane 0");
    // A message's counters are loaded before its data enters.
    a_no_data_with_start : assert property (
      @(posedge clk) disable iff (!rst_n)
      msg_start |-> !((mode == MODE_CTR) && (|in_valid)))
      else $error("aes_engine: counter-mode data in the msg_start cycle");
  end else begin : g_ecb_only
    aes_multicore #(.N_CORES(N_CORES)) u_array (
      .clk(clk), .rst_n(rst_n), .key_in(key_in), .key_ready(key_ready),
      .in_valid(in_valid), .data_in(data_in),
      .out_valid(out_valid), .data_out(data_out));
    assign tag_mask_valid = 1'b0;
    assign tag_mask       = '0;
  end
endmodule
