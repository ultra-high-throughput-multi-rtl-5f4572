// tb_aes_shift_matrix: ShiftMatrix against the reference ShiftRows.
//
// A block whose byte i holds the value i shows the permutation directly;
// random blocks are compared with aes_ref_pkg::shift_rows.
module tb_aes_shift_matrix;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
  int checks = 0, failures = 0;

  aes_shift_matrix dut (.state_in(s_in), .state_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Byte i = i: row r is rotated left by r (FIPS-197 Figure 8).
    s_in = 128'h000102030405060708090a0b0c0d0e0f; #1;
    checks++;
    if (s_out !== 128'h00050a0f04090e03080d02070c01060b) begin
      failures++; $display("FAIL index pattern: %032h", s_out);
    end
    for (int n = 0; n < 200; n++) begin
      s_in = rand128(); #1;
      checks++;
      if (s_out !== shift_rows(s_in)) begin
        failures++; $display("FAIL in %032h: got %032h", s_in, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
