// tb_aes_key_exp_round: the ten key-expansion rounds against the reference.
//
// Ten instances (ROUND = 1..10) are chained combinationally; for the
// FIPS-197 key 2b7e1516... every round key is compared with the values
// printed in FIPS-197 Appendix A.1 for round keys 1 and 10, and for random
// keys all ten with aes_ref_pkg::key_schedule.
module tb_aes_key_exp_round;
  import aes_ref_pkg::*;
  logic [127:0] k [0:10];
  int checks = 0, failures = 0;

  for (genvar j = 1; j <= 10; j++) begin : g_r
    aes_key_exp_round #(.ROUND(j)) dut (.key_in(k[j-1]), .key_out(k[j]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    rk_t ref_rk;
    k[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check(k[1],  128'ha0fafe1788542cb123a339392a6c7605, "FIPS-197 round key 1");
    check(k[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    for (int n = 0; n < 50; n++) begin
      k[0] = (n == 0) ? 128'h0 : rand128();
      #1;
      ref_rk = key_schedule(k[0]);
      for (int j = 1; j <= 10; j++)
        check(k[j], ref_rk[j], $sformatf("round key %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
