// thermal_noise_source: pseudo-random numbers that stand in for the thermal
// fluctuation felt by one biased phi4 buffer.
//
// In the circuit the randomness is physical: a buffer whose input current is
// weakened by the bias current switches to the wrong state with some probability.
// A digital model needs a random sample per switching event instead. This module
// is a 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) that advances
// once per cycle in which `step` is high; `rnd` is its top PROB_W bits, which are
// close to uniform over 0 .. 2^PROB_W-1. Each buffer gets its own generator with a
// different SEED so that the buffers fluctuate independently.
// Interface: clk, asynchronous active-low reset (loads SEED), step, rnd.
// Timing: rnd changes one cycle after a cycle with step high.
// Entirely this design's own choice: the generator, its width and the seeding.
module thermal_noise_source
  import saps_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output rnd_t rnd
);

  // A zero state would lock xorshift at zero.
  localparam logic [31:0] SEED_NZ = (SEED == 32'd0) ? 32'h2545_F491 : SEED;

  logic [31:0] state_q;
  logic [31:0] s1, s2, s3;

  always_comb begin
    s1 = state_q ^ (state_q << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= SEED_NZ;
    else if (step) state_q <= s3;
  end

  assign rnd = state_q[31 -: PROB_W];

endmodule
