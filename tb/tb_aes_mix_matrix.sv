// tb_aes_mix_matrix: MixMatrix against the reference MixColumns.
//
// FIPS-197 Appendix B (round 1, after ShiftRows -> after MixColumns) and
// random states compared with aes_ref_pkg::mix_columns.
module tb_aes_mix_matrix;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
  int checks = 0, failures = 0;

  aes_mix_matrix dut (.state_in(s_in), .state_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] inp, logic [127:0] exp);
    s_in = inp;
    #1;
    checks++;
    if (s_out !== exp) begin
      failures++;
      $display("FAIL in %032h: got %032h expected %032h", inp, s_out, exp);
    end
  endtask

  initial begin
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] v = rand128();
      check(v, mix_columns(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
