// tb_aes_sbox: exhaustive check of the S-Box look-up table.
//
// All 256 inputs are applied and each output is compared with the S-box
// computed from its definition (GF(2^8) inverse plus affine map) in
// aes_ref_pkg, plus a few well-known entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(y, sbox(8'(i)), $sformatf("S(%02h)", i));
    end
    a = 8'h00; #1; check(y, 8'h63, "S(00)");
    a = 8'h53; #1; check(y, 8'hed, "S(53)");
    a = 8'hff; #1; check(y, 8'h16, "S(ff)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
