// tb_aes_add_round_key: AddRoundKey is a byte-wise XOR.
//
// FIPS-197 Appendix B initial round (input XOR cipher key) and random
// state/key pairs, checked against the XOR computed in the testbench.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] s_in, rk, s_out;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_in(s_in), .round_key(rk), .state_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] s, logic [127:0] k, logic [127:0] exp);
    s_in = s; rk = k;
    #1;
    checks++;
    if (s_out !== exp) begin
      failures++;
      $display("FAIL %032h ^ %032h: got %032h expected %032h", s, k, s_out, exp);
    end
  endtask

  initial begin
    check(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] a = rand128();
      logic [127:0] b = rand128();
      check(a, b, a ^ b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
