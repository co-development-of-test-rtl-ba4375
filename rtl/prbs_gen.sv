// prbs_gen: pseudo-random packet source for data synthesis and self-test.
//
// A 31-bit Fibonacci LFSR for the polynomial x^31 + x^28 + 1 (PRBS31).
// Each output bit is s[30] ^ s[27] of the current state, which then
// shifts left taking that bit in at s[0]. One packet is W consecutive
// output bits, first bit in data[0]; the W steps are unrolled so a new
// packet is ready every clock. `data` is the packet the current state
// produces (combinational); `next` moves the state on by W steps at the
// clock edge. Reset and `seed_load` return the state to SEED, so the
// first packet is the first W bits produced from SEED. The document says the FPGA generates
// pseudo-random data with an LFSR but gives no polynomial; PRBS31 is this
// design's choice.
`timescale 1ps / 1ps
module prbs_gen #(
  parameter int unsigned W    = 256,
  parameter logic [30:0] SEED = 31'h0000_0001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic         next,
  output logic [W-1:0] data
);

  logic [30:0] state;
  logic [30:0] run_next;

  function automatic void advance(input logic [30:0] s_in,
                                  output logic [W-1:0] bits,
                                  output logic [30:0] s_out);
    logic [30:0] s;
    logic        b;
    s = s_in;
    for (int i = 0; i < int'(W); i++) begin
      b       = s[30] ^ s[27];
      bits[i] = b;
      s       = {s[29:0], b};
    end
    s_out = s;
  endfunction

  always_comb advance(state, data, run_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= SEED;
    else if (seed_load) state <= SEED;
    else if (next)      state <= run_next;
  end

endmodule
