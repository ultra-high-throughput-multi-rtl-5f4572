// tb_aes_core: one outer-round pipelined AES core.
//
// The round keys are computed in the testbench (reference key schedule) and
// held. The FIPS-197 vectors and a stream of random blocks, one per cycle
// with random gaps, are pushed in; every output is compared with the
// reference cipher, and each block must leave exactly 11 clock edges after
// it entered. Then the key is changed and another stream is checked.
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::aes_round_keys_t;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [127:0] data_in = '0, data_out;
  aes_round_keys_t round_keys;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_core dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .data_in(data_in),
                .round_keys(round_keys), .out_valid(out_valid), .data_out(data_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, in order, with the edge at which they must appear.
  logic [127:0] exp_q [$];
  int           due_q [$];
  logic [127:0] cur_key;
  int sent = 0, received = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output %032h", data_out);
      end else begin
        logic [127:0] e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        received++;
        if (data_out !== e || cycle != d) begin
          failures++;
          $display("FAIL got %032h at %0d expected %032h at %0d", data_out, cycle, e, d);
        end
      end
    end
  end

  task automatic set_key(logic [127:0] key);
    rk_t r = key_schedule(key);
    cur_key = key;
    for (int j = 0; j <= 10; j++) round_keys[j] = r[j];
  endtask

  // Present one block for one cycle (or an idle cycle).
  task automatic drive(logic v, logic [127:0] pt);
    in_valid = v;
    data_in  = pt;
    if (v) begin
      exp_q.push_back(encrypt(cur_key, pt));
      due_q.push_back(cycle + 11);  // sampled at this edge, out 11 edges on
      sent++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // FIPS-197 Appendix C.1; known answer also checked explicitly below.
    drive(1, 128'h00112233445566778899aabbccddeeff);
    drive(0, '0);
    for (int n = 0; n < 200; n++) drive(($urandom % 4) != 0, rand128());
    drive(0, '0);
    repeat (12) @(posedge clk); #1;
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    drive(1, 128'h3243f6a8885a308d313198a2e0370734);
    for (int n = 0; n < 200; n++) drive(1, rand128());
    drive(0, '0);
    repeat (14) @(posedge clk);
    checks++;
    if (received != sent || sent < 300) begin
      failures++; $display("FAIL sent %0d received %0d", sent, received);
    end
    checks++;
    if (encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL reference model disagrees with FIPS-197 C.1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
