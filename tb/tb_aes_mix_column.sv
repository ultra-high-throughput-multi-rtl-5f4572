// tb_aes_mix_column: one MixColumn block against the GF(2^8) matrix product.
//
// Uses the FIPS-197 column db 13 53 45 -> 8e 4d a1 bc and others, every
// single-byte column 00..ff in each row position (which exercises the
// 8'h1b reduction of each doubler), and random columns. The reference
// multiplies by the matrix with a generic GF(2^8) multiplier.
module tb_aes_mix_column;
  import aes_ref_pkg::*;
  logic [31:0] c_in, c_out;
  int checks = 0, failures = 0;

  aes_mix_column dut (.col_in(c_in), .col_out(c_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] inp, logic [31:0] exp);
    c_in = inp;
    #1;
    checks++;
    if (c_out !== exp) begin
      failures++;
      $display("FAIL in %08h: got %08h expected %08h", inp, c_out, exp);
    end
  endtask

  initial begin
    check(32'hdb135345, 32'h8e4da1bc);
    check(32'hf20a225c, 32'h9fdc589d);
    check(32'h01010101, 32'h01010101);
    check(32'hc6c6c6c6, 32'hc6c6c6c6);
    for (int p = 0; p < 4; p++)
      for (int v = 0; v < 256; v++) begin
        logic [31:0] w = 32'(v) << (8*p);
        check(w, mix_column(w));
      end
    for (int n = 0; n < 200; n++) begin
      logic [31:0] w = $urandom;
      check(w, mix_column(w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
