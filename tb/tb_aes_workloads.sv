// tb_aes_workloads: the array sizes evaluated for the design, at full rate.
//
// Four arrays are built side by side with N = 1, 2, 4 and 10 cores (the
// single core, and the sizes suggested for 200 Gbit/s, 400 Gbit/s and
// 1 Tbit/s links) and share one key. Each is fed a new random block on
// every lane on every cycle for BURST cycles. For each array the testbench
// checks every ciphertext against the reference cipher, the latency of 11
// cycles, and that it delivers N x 128 bits on each of BURST consecutive
// cycles. It prints the rate that this gives at the clock frequencies
// reported for those sizes (870, 847, 847 and 800 MHz).
module tb_aes_workloads;
  import aes_ref_pkg::*;
  import aes_pkg::aes_block_t;

  localparam int NCFG = 4;
  localparam int NS [NCFG] = '{1, 2, 4, 10};
  localparam int FMHZ [NCFG] = '{870, 847, 847, 800};
  localparam int BURST = 30;

  logic clk = 0, rst_n = 0;
  logic [127:0] key_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic go = 0;
  int cycle = 0;
  int checks = 0, failures = 0;
  int bits_cycles [NCFG];   // cycles on which all N lanes delivered
  int errs [NCFG];
  int blocks [NCFG];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int N = NS[g];
    logic key_ready;
    logic       [N-1:0] in_valid, out_valid;
    aes_block_t [N-1:0] data_in, data_out;
    logic [127:0] exp_q [N][$];
    int           due_q [N][$];
    int sent = 0;

    aes_multicore #(.N_CORES(N)) dut (
      .clk(clk), .rst_n(rst_n), .key_in(key_in), .key_ready(key_ready),
      .in_valid(in_valid), .data_in(data_in), .out_valid(out_valid), .data_out(data_out));

    // Drive: every lane, every cycle, while go is high and BURST not done.
    always @(negedge clk) begin
      in_valid = '0;
      if (go && sent < BURST) begin
        in_valid = '1;
        for (int i = 0; i < N; i++) begin
          data_in[i] = rand128();
          exp_q[i].push_back(encrypt(key_in, data_in[i]));
          due_q[i].push_back(cycle + 11);
        end
        sent++;
      end
    end

    always @(posedge clk) if (rst_n) begin
      if (&out_valid) bits_cycles[g]++;
      for (int i = 0; i < N; i++) if (out_valid[i]) begin
        logic [127:0] e;
        int d;
        blocks[g]++;
        e = exp_q[i].pop_front();
        d = due_q[i].pop_front();
        if (data_out[i] !== e || cycle != d) errs[g]++;
      end
    end
  end

  initial begin
    for (int g = 0; g < NCFG; g++) begin
      bits_cycles[g] = 0; errs[g] = 0; blocks[g] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (12) @(posedge clk);
    @(negedge clk) go = 1;
    repeat (BURST + 15) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (errs[g] != 0) begin
        failures++; $display("FAIL N=%0d: %0d wrong or late blocks", NS[g], errs[g]);
      end
      checks++;
      if (blocks[g] != NS[g] * BURST) begin
        failures++; $display("FAIL N=%0d: %0d blocks out, %0d expected", NS[g], blocks[g], NS[g]*BURST);
      end
      checks++;
      if (bits_cycles[g] != BURST) begin
        failures++; $display("FAIL N=%0d: %0d full-rate cycles, %0d expected", NS[g], bits_cycles[g], BURST);
      end
      $display("N=%0d: %0d bits per cycle, %0d.%0d Gbit/s at %0d MHz", NS[g], NS[g]*128,
               NS[g]*128*FMHZ[g]/1000, (NS[g]*128*FMHZ[g]/100) % 10, FMHZ[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
