// tb_aes_cipher_round: a full round and a final round against the reference.
//
// Two instances are checked side by side: HAS_MIX = 1 (SubBytes, ShiftRows,
// MixColumns, AddRoundKey) with the FIPS-197 Appendix B round 1 and random
// states and keys, and HAS_MIX = 0 (no MixColumns) with random states and
// keys.
module tb_aes_cipher_round;
  import aes_ref_pkg::*;
  logic [127:0] s_in, rk, s_full, s_last;
  int checks = 0, failures = 0;

  aes_cipher_round #(.HAS_MIX(1'b1)) dut_full (.state_in(s_in), .round_key(rk), .state_out(s_full));
  aes_cipher_round #(.HAS_MIX(1'b0)) dut_last (.state_in(s_in), .round_key(rk), .state_out(s_last));

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
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk   = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check(s_full, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1");
    for (int n = 0; n < 200; n++) begin
      s_in = rand128();
      rk   = rand128();
      #1;
      check(s_full, mix_columns(shift_rows(sub_bytes(s_in))) ^ rk, "random full round");
      check(s_last, shift_rows(sub_bytes(s_in)) ^ rk, "random final round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
