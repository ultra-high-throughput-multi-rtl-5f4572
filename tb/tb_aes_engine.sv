// tb_aes_engine: end-to-end test of the whole engine at its default size.
//
// No parameter is overridden: ten data lanes plus the J0 core. The test
//  1. loads a key and checks key_ready comes after 11 edges;
//  2. streams ECB blocks on all lanes and on random lane patterns;
//  3. runs counter-mode messages: msg_start with a random IV, full cycles,
//     a last cycle with only the low lanes filled, and checks every output
//     against data XOR AES(key, IV || counter) and tag_mask against
//     AES(key, IV || 1), 12 edges after msg_start;
//  4. decrypts a message by feeding its ciphertext back with the same IV;
//  5. mixes ECB and counter-mode cycles block by block (mode switches);
//  6. changes the key and repeats.
// Every output must appear exactly 11 edges after its input. Counted
// mechanisms, each of which must happen: key changes, ECB cycles,
// counter-mode cycles, partly filled last cycles, mode switches between
// consecutive busy cycles, tag masks, round-trip decryptions.
module tb_aes_engine;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  localparam int N = 10;   // default lane count of aes_engine

  logic clk = 0, rst_n = 0;
  logic [127:0] key_in = '0;
  logic key_ready;
  aes_mode_t mode = MODE_ECB;
  logic msg_start = 0;
  logic [95:0] iv = '0;
  logic       [N-1:0] in_valid = '0, out_valid;
  aes_block_t [N-1:0] data_in, data_out;
  logic tag_mask_valid;
  aes_block_t tag_mask;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_engine dut (.clk(clk), .rst_n(rst_n), .key_in(key_in), .key_ready(key_ready),
                  .mode(mode), .msg_start(msg_start), .iv(iv),
                  .in_valid(in_valid), .data_in(data_in),
                  .out_valid(out_valid), .data_out(data_out),
                  .tag_mask_valid(tag_mask_valid), .tag_mask(tag_mask));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] exp_q [N][$];
  int           due_q [N][$];
  logic [127:0] tag_exp_q [$];
  int           tag_due_q [$];
  logic [127:0] got_q [N][$];        // outputs kept for the round trip
  int key_changes = 0, ecb_cycles = 0, ctr_cycles = 0, partial_ctr = 0;
  int mode_switches = 0, tags = 0, round_trips = 0, messages = 0;
  logic last_busy = 0;
  aes_mode_t last_mode = MODE_ECB;
  int unsigned ctr_next;             // counter of lane 0 in the next CTR cycle

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (out_valid[i]) begin
      logic [127:0] e;
      int d;
      checks++;
      if (exp_q[i].size() == 0) begin
        failures++; $display("FAIL lane %0d unexpected output", i);
      end else begin
        e = exp_q[i].pop_front();
        d = due_q[i].pop_front();
        got_q[i].push_back(data_out[i]);
        if (data_out[i] !== e || cycle != d) begin
          failures++;
          $display("FAIL lane %0d got %032h at %0d expected %032h at %0d",
                   i, data_out[i], cycle, e, d);
        end
      end
    end
    if (tag_mask_valid) begin
      logic [127:0] e;
      int d;
      checks++;
      tags++;
      if (tag_exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected tag mask");
      end else begin
        e = tag_exp_q.pop_front();
        d = tag_due_q.pop_front();
        if (tag_mask !== e || cycle != d) begin
          failures++;
          $display("FAIL tag mask %032h at %0d expected %032h at %0d", tag_mask, cycle, e, d);
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
    while (!key_ready && waited <= 20) begin
      @(posedge clk); #1;
      waited++;
    end
    check(waited == 11, $sformatf("key ready after %0d edges", waited));
    key_changes++;
  endtask

  task automatic start_msg(logic [95:0] v);
    iv = v;
    msg_start = 1;
    in_valid = '0;
    tag_exp_q.push_back(encrypt(key_in, {v, 32'd1}));
    tag_due_q.push_back(cycle + 12);
    ctr_next = 2;
    messages++;
    @(posedge clk); #1;
    msg_start = 0;
  endtask

  // One cycle of input; data given per lane.
  task automatic drive(aes_mode_t m, logic [N-1:0] v, aes_block_t [N-1:0] d);
    mode = m;
    in_valid = v;
    data_in = d;
    for (int i = 0; i < N; i++) if (v[i]) begin
      exp_q[i].push_back(m == MODE_CTR ? (d[i] ^ encrypt(key_in, {iv, 32'(ctr_next + i)}))
                                       : encrypt(key_in, d[i]));
      due_q[i].push_back(cycle + 11);
    end
    if (|v) begin
      if (last_busy && last_mode != m) mode_switches++;
      if (m == MODE_CTR) begin
        ctr_cycles++;
        if (!(&v)) partial_ctr++;
        ctr_next += N;
      end else ecb_cycles++;
      last_mode = m;
    end
    last_busy = |v;
    @(posedge clk); #1;
  endtask

  function automatic aes_block_t [N-1:0] rand_lanes();
    aes_block_t [N-1:0] d;
    for (int i = 0; i < N; i++) d[i] = rand128();
    return d;
  endfunction

  task automatic idle(int n);
    in_valid = '0;
    last_busy = 0;
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [N-1:0] lanes, last_lanes;
    aes_block_t [N-1:0] pt [8];
    aes_block_t [N-1:0] ct [8];
    logic [95:0] v;
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    for (int k = 0; k < 2; k++) begin
      load_key(k == 0 ? 128'h000102030405060708090a0b0c0d0e0f : rand128());

      // ECB: full rate, then random lane patterns.
      for (int c = 0; c < 20; c++) drive(MODE_ECB, '1, rand_lanes());
      for (int c = 0; c < 20; c++) drive(MODE_ECB, N'({$urandom, $urandom}), rand_lanes());
      idle(13);
      for (int i = 0; i < N; i++) got_q[i].delete();

      // Counter mode: a message of 8 cycles, the last one partly filled.
      v = {$urandom, $urandom, $urandom};
      start_msg(v);
      for (int c = 0; c < 8; c++) begin
        lanes = (c == 7) ? N'((1 << (1 + $urandom % (N-1))) - 1) : '1;
        pt[c] = rand_lanes();
        drive(MODE_CTR, lanes, pt[c]);
      end
      last_lanes = lanes;
      idle(14);
      // Decrypt: the same IV turns the ciphertext back into plaintext.
      for (int i = 0; i < N; i++)
        for (int c = 0; c < 8; c++)
          ct[c][i] = (c < got_q[i].size()) ? got_q[i][c] : '0;
      for (int i = 0; i < N; i++) got_q[i].delete();
      start_msg(v);
      for (int c = 0; c < 8; c++) drive(MODE_CTR, (c == 7) ? last_lanes : '1, ct[c]);
      idle(14);
      begin
        bit ok = 1;
        for (int i = 0; i < N; i++)
          for (int c = 0; c < 8; c++)
            if (c < 7 || last_lanes[i])
              if (c >= got_q[i].size() || got_q[i][c] !== pt[c][i]) ok = 0;
        check(ok, "counter-mode round trip gives the plaintext back");
        if (ok) round_trips++;
      end
      for (int i = 0; i < N; i++) got_q[i].delete();

      // Mixed: ECB and counter-mode cycles interleaved within one message.
      start_msg({$urandom, $urandom, $urandom});
      for (int c = 0; c < 40; c++) begin
        if ($urandom % 2) drive(MODE_CTR, '1, rand_lanes());
        else              drive(MODE_ECB, N'({$urandom, $urandom}), rand_lanes());
      end
      idle(14);
      for (int i = 0; i < N; i++) got_q[i].delete();
    end

    for (int i = 0; i < N; i++) check(exp_q[i].size() == 0, $sformatf("lane %0d drained", i));
    check(tag_exp_q.size() == 0, "all tag masks delivered");
    check(key_changes >= 2, "key changes happened");
    check(ecb_cycles > 0, "ECB cycles happened");
    check(ctr_cycles > 0, "counter-mode cycles happened");
    check(partial_ctr > 0, "partly filled counter-mode cycles happened");
    check(mode_switches > 0, "mode switches happened");
    check(tags > 0, "tag masks produced");
    check(round_trips > 0, "round trips happened");
    $display("mechanisms: key_changes=%0d ecb_cycles=%0d ctr_cycles=%0d partial_ctr=%0d mode_switches=%0d tags=%0d round_trips=%0d messages=%0d",
             key_changes, ecb_cycles, ctr_cycles, partial_ctr, mode_switches, tags, round_trips, messages);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
