// tb_aes_ctr_counters: the counter-block generator of the GCM configuration.
//
// Loads IVs and checks J0 = IV || 1 and the lane counters IV || (2+i) the
// cycle after; then advances for a number of cycles, with random pauses,
// and checks that lane i always holds IV || (2 + N*k + i) after k advances,
// that the counters hold still without advance, and that load overrides
// advance.
module tb_aes_ctr_counters;
  import aes_ref_pkg::*;
  import aes_pkg::aes_block_t;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, load = 0, advance = 0;
  logic [95:0] iv = '0;
  aes_block_t j0;
  aes_block_t [N-1:0] ctr;
  int checks = 0, failures = 0;

  aes_ctr_counters #(.N_LANES(N)) dut (.clk(clk), .rst_n(rst_n), .load(load), .iv(iv),
                                       .advance(advance), .j0(j0), .ctr(ctr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(logic [95:0] v, int unsigned first);
    checks++;
    if (j0 !== {v, 32'd1}) begin
      failures++; $display("FAIL j0 %032h", j0);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (ctr[i] !== {v, 32'(first + i)}) begin
        failures++;
        $display("FAIL lane %0d: %032h expected count %0d", i, ctr[i], first + i);
      end
    end
  endtask

  initial begin
    int unsigned expect_first;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 5; m++) begin
      iv = {$urandom, $urandom, $urandom};
      load = 1; advance = (m % 2 == 1);   // load must win over advance
      @(posedge clk); #1;
      load = 0; advance = 0;
      expect_first = 2;
      expect_state(iv, expect_first);
      for (int k = 0; k < 30; k++) begin
        advance = ($urandom % 3) != 0;
        @(posedge clk); #1;
        if (advance) expect_first += N;
        expect_state(iv, expect_first);
      end
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
