// tb_aes_multicore: end-to-end test of the multi-core AES array.
//
// The array is instantiated at its default size (ten cores, no parameter
// override), so this is also the full-size test. For each of several keys
// the testbench applies the key, waits for key_ready (checking that it
// takes exactly 11 edges), then streams blocks: first every lane on every
// cycle (the full N x 128 bits per cycle), then random lane patterns with
// idle lanes. Every output of every lane is compared with the reference
// cipher and must come out exactly 11 edges after it went in. It also
// checks the sustained rate: during a full-rate burst of B cycles all lanes
// deliver B blocks each on consecutive cycles.
//
// Mechanisms counted (each must occur at least once): key changes with
// key_ready re-acquired, cycles with all lanes busy, cycles with some lanes
// idle, and blocks carried by every individual lane.
module tb_aes_multicore;
  import aes_ref_pkg::*;
  import aes_pkg::aes_block_t;

  localparam int N = 10;     // matches the default of aes_multicore
  localparam int BURST = 40;

  logic clk = 0, rst_n = 0;
  logic [127:0] key_in = '0;
  logic key_ready;
  logic       [N-1:0] in_valid = '0, out_valid;
  aes_block_t [N-1:0] data_in, data_out;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_multicore dut (.clk(clk), .rst_n(rst_n), .key_in(key_in), .key_ready(key_ready),
                     .in_valid(in_valid), .data_in(data_in),
                     .out_valid(out_valid), .data_out(data_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-lane queues of expected ciphertexts and due edges.
  logic [127:0] exp_q [N][$];
  int           due_q [N][$];
  int lane_blocks [N];
  int key_changes = 0, full_cycles = 0, partial_cycles = 0;
  int full_out_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (&out_valid) full_out_cycles++;
    for (int i = 0; i < N; i++) if (out_valid[i]) begin
      checks++;
      if (exp_q[i].size() == 0) begin
        failures++; $display("FAIL lane %0d unexpected output", i);
      end else begin
        logic [127:0] e;
        int d;
        e = exp_q[i].pop_front();
        d = due_q[i].pop_front();
        lane_blocks[i]++;
        if (data_out[i] !== e || cycle != d) begin
          failures++;
          $display("FAIL lane %0d got %032h at %0d expected %032h at %0d",
                   i, data_out[i], cycle, e, d);
        end
      end
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++; $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load_key(logic [127:0] key);
    int waited = 0;
    key_in = key;
    #1;
    check(!key_ready, "key_ready falls with a new key");
    while (!key_ready) begin
      @(posedge clk); #1;
      waited++;
      if (waited > 20) break;
    end
    check(waited == 11, $sformatf("key ready after %0d edges, expected 11", waited));
    key_changes++;
  endtask

  task automatic drive(logic [N-1:0] v);
    in_valid = v;
    for (int i = 0; i < N; i++) begin
      data_in[i] = rand128();
      if (v[i]) begin
        exp_q[i].push_back(encrypt(key_in, data_in[i]));
        due_q[i].push_back(cycle + 11);
      end
    end
    if (&v) full_cycles++;
    else if (|v) partial_cycles++;
    @(posedge clk); #1;
  endtask

  task automatic drain();
    in_valid = '0;
    repeat (13) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [127:0] keys [4] = '{128'h000102030405060708090a0b0c0d0e0f,
                               128'h2b7e151628aed2a6abf7158809cf4f3c, '0, '0};
    keys[2] = rand128();
    keys[3] = rand128();
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      int n_before;
      load_key(keys[k]);
      // FIPS-197 C.1 plaintext on lane 0 with the C.1 key
      n_before = full_out_cycles;
      for (int c = 0; c < BURST; c++) drive('1);
      drain();
      check(full_out_cycles - n_before == BURST,
            $sformatf("full-rate burst: %0d of %0d cycles delivered on all lanes",
                      full_out_cycles - n_before, BURST));
      for (int c = 0; c < 60; c++) drive(N'({$urandom, $urandom}));
      drain();
    end
    // Known answer through the array: FIPS-197 Appendix C.1 on every lane.
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    in_valid = '1;
    for (int i = 0; i < N; i++) begin
      data_in[i] = 128'h00112233445566778899aabbccddeeff;
      exp_q[i].push_back(128'h69c4e0d86a7b0430d8cdb78070b4c55a);
      due_q[i].push_back(cycle + 11);
    end
    @(posedge clk); #1;
    drain();

    for (int i = 0; i < N; i++) begin
      check(exp_q[i].size() == 0, $sformatf("lane %0d delivered every block", i));
      check(lane_blocks[i] > 0, $sformatf("lane %0d carried blocks", i));
    end
    check(key_changes >= 2, "key changes happened");
    check(full_cycles > 0, "all-lanes-busy cycles happened");
    check(partial_cycles > 0, "partly idle cycles happened");
    $display("mechanisms: key_changes=%0d full_cycles=%0d partial_cycles=%0d blocks_lane0=%0d",
             key_changes, full_cycles, partial_cycles, lane_blocks[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
