// tb_aes_sub_matrix: SubMatrix against the reference SubBytes.
//
// Random 128-bit states and a few fixed ones are applied; every output is
// compared with aes_ref_pkg::sub_bytes, which computes each S-box value
// from its definition.
module tb_aes_sub_matrix;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
  int checks = 0, failures = 0;

  aes_sub_matrix dut (.state_in(s_in), .state_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] inp);
    s_in = inp;
    #1;
    checks++;
    if (s_out !== sub_bytes(inp)) begin
      failures++;
      $display("FAIL in %032h: got %032h expected %032h", inp, s_out, sub_bytes(inp));
    end
  endtask

  initial begin
    check(128'h0);
    check(128'h00112233445566778899aabbccddeeff);
    // FIPS-197 Appendix B, round 1 start -> after SubBytes
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    checks++;
    if (s_out !== 128'hd42711aee0bf98f1b8b45de51e415230) begin
      failures++; $display("FAIL FIPS-197 SubBytes vector: %032h", s_out);
    end
    for (int n = 0; n < 200; n++) check(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
