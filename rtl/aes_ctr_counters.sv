// aes_ctr_counters: counter-block generator for the GCM configuration.
//
// For counter mode every data lane needs its own counter block each cycle.
// A message starts with load: the 96-bit IV is stored and Counter 0 becomes
// J0 = IV || 32'h00000001, the block whose encryption masks the
// authentication tag. The data counters follow it as a chain of Incr
// blocks: Counter 1 = Incr(J0), Counter i+1 = Incr(Counter i), so the N
// lanes of one cycle get N consecutive counters. Incr is the GCM inc32
// function: the low 32 bits count up modulo 2^32 and the IV part stays.
// Each advance (one cycle of data consumed) moves the chain on by N, so the
// next cycle starts at Incr(Counter N).
//
// Timing: load and advance act at the clock edge; the counters are
// registered-base plus combinational Incr chain, valid the cycle after load.
// load wins over advance. Chain and J0 follow the GCM figure of the design;
// inc32 and the J0 format are the usual GCM choices for a 96-bit IV.
// Reset (synchronous, active low) clears the stored counters.
module aes_ctr_counters
  import aes_pkg::*;
#(
  parameter int unsigned N_LANES = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,      // start of a message
  input  logic [95:0]               iv,
  input  logic                      advance,   // this cycle's counters are used
  output aes_block_t                j0,        // Counter 0
  output aes_block_t [N_LANES-1:0]  ctr        // Counter 1..N of this cycle
);
  aes_block_t base_q;   // Counter 1 of the current cycle
  aes_block_t j0_q;

  function automatic aes_block_t incr(aes_block_t c);
    return {c[127:32], c[31:0] + 32'd1};
  endfunction

  // The Incr chain: one incrementer between neighbouring counters.
  assign ctr[0] = base_q;
  for (genvar i = 1; i < N_LANES; i++) begin : g_incr
    assign ctr[i] = incr(ctr[i-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base_q <= '0;
      j0_q   <= '0;
    end else if (load) begin
      j0_q   <= {iv, 32'h0000_0001};
      base_q <= {iv, 32'h0000_0002};
    end else if (advance) begin
      base_q <= incr(ctr[N_LANES-1]);
    end
  end

  assign j0 = j0_q;
endmodule
