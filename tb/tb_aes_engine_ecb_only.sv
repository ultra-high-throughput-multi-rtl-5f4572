// tb_aes_engine_ecb_only: the engine built without counter mode.
//
// With CTR_EN = 0 the engine is only the shared-key ECB array. Three lanes
// are streamed with random lane patterns under two keys; every output is
// compared with the reference cipher at exactly 11 cycles, and tag_mask_valid
// must stay low.
module tb_aes_engine_ecb_only;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [127:0] key_in = '0;
  logic key_ready, tag_mask_valid;
  logic       [N-1:0] in_valid = '0, out_valid;
  aes_block_t [N-1:0] data_in, data_out;
  aes_block_t tag_mask;
  int checks = 0, failures = 0, cycle = 0, received = 0, sent = 0;
  logic [127:0] exp_q [N][$];
  int           due_q [N][$];

  aes_engine #(.N_CORES(N), .CTR_EN(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .key_in(key_in), .key_ready(key_ready),
    .mode(MODE_ECB), .msg_start(1'b0), .iv('0),
    .in_valid(in_valid), .data_in(data_in), .out_valid(out_valid), .data_out(data_out),
    .tag_mask_valid(tag_mask_valid), .tag_mask(tag_mask));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tag_mask_valid) begin
      checks++; failures++; $display("FAIL tag_mask_valid without counter mode");
    end
    for (int i = 0; i < N; i++) if (out_valid[i]) begin
      logic [127:0] e;
      int d;
      checks++;
      received++;
      if (exp_q[i].size() == 0) begin
        failures++; $display("FAIL lane %0d unexpected output", i);
      end else begin
        e = exp_q[i].pop_front();
        d = due_q[i].pop_front();
        if (data_out[i] !== e || cycle != d) begin
          failures++;
          $display("FAIL lane %0d got %032h at %0d expected %032h at %0d", i, data_out[i], cycle, e, d);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      key_in = (k == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();
      do begin @(posedge clk); #1; end while (!key_ready);
      for (int c = 0; c < 80; c++) begin
        in_valid = N'($urandom);
        for (int i = 0; i < N; i++) begin
          data_in[i] = rand128();
          if (in_valid[i]) begin
            exp_q[i].push_back(encrypt(key_in, data_in[i]));
            due_q[i].push_back(cycle + 11);
            sent++;
          end
        end
        @(posedge clk); #1;
      end
      in_valid = '0;
      repeat (13) @(posedge clk);
      #1;
    end
    checks++;
    if (received != sent || sent == 0) begin
      failures++; $display("FAIL sent %0d received %0d", sent, received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
