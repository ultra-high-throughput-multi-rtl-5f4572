// tb_aes_key_expansion: the pipelined, shared key expansion.
//
// After reset a key is applied and held. Each cycle the testbench checks
// that key_ready stays low until 11 clock edges have passed and that round
// key j equals the reference exactly from edge j+1 onward (round key 0 at
// once). The key is then changed a few times: key_ready must fall in the
// same cycle and rise again 11 edges later with all round keys of the new
// key.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::aes_round_keys_t;
  logic clk = 0, rst_n = 0;
  logic [127:0] key_in;
  aes_round_keys_t round_keys;
  logic key_ready;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk(clk), .rst_n(rst_n), .key_in(key_in),
                         .round_keys(round_keys), .key_ready(key_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Apply a new key just after an edge and follow it for 14 edges.
  task automatic follow_key(logic [127:0] key);
    rk_t ref_rk = key_schedule(key);
    key_in = key;
    #1;
    check(!key_ready, "key_ready low right after key change");
    check(round_keys[0] == ref_rk[0], "round key 0 passes straight through");
    for (int e = 1; e <= 14; e++) begin
      @(posedge clk); #1;
      check(key_ready == (e >= 11), $sformatf("key_ready after %0d edges", e));
      for (int j = 1; j <= 10; j++)
        if (e >= j + 1)
          check(round_keys[j] == ref_rk[j], $sformatf("round key %0d after %0d edges", j, e));
    end
  endtask

  initial begin
    key_in = 128'h0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    follow_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(round_keys[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    follow_key(128'h000102030405060708090a0b0c0d0e0f);
    for (int n = 0; n < 5; n++) follow_key(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
